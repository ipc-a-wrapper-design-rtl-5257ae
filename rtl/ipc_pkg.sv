// ipc_pkg: types and constants shared by the interface protocol components
// (IPCs) and the wrapper controller.
//
// An IPC talks to its protocol partner cycle by cycle and to the core by
// transactions.  The core side of every IPC carries a transaction code
// (TRCODE) and an end-of-transaction strobe (TREND); the codes below give each
// protocol's transactions a number.  The names ENCR, DECR, READ, WRITE and
// Transmit follow the protocol descriptions of the methodology; Receive and
// the Wishbone and SRAM READ/WRITE are named after them.  The numeric
// encodings, the idle code 0 and the PPCI register addresses are this
// design's own choice.
package ipc_pkg;

  // PPCI (simplified peripheral VCI) transactions, reported by the slave IPC.
  typedef enum logic [1:0] {
    PPCI_NONE  = 2'd0,
    PPCI_READ  = 2'd1,
    PPCI_WRITE = 2'd2
  } ppci_trcode_e;

  // DES transactions, requested from the master IPC by the core.
  typedef enum logic [1:0] {
    DES_NONE = 2'd0,
    DES_ENCR = 2'd1,
    DES_DECR = 2'd2
  } des_trcode_e;

  // UTOPIA transmit transactions.
  typedef enum logic {
    UT_NONE     = 1'b0,
    UT_TRANSMIT = 1'b1
  } utopia_trcode_e;

  // SRAM transactions, requested from the SRAM master IPC.  The codes equal
  // the PPCI ones so that a PPCI slave IPC can drive an SRAM master IPC
  // directly, with no logic in between.
  typedef enum logic [1:0] {
    SR_NONE  = 2'd0,
    SR_READ  = 2'd1,
    SR_WRITE = 2'd2
  } sram_trcode_e;

  // UTOPIA receive transactions.
  typedef enum logic {
    UR_NONE    = 1'b0,
    UR_RECEIVE = 1'b1
  } utopia_rx_trcode_e;

  // Wishbone transactions (single READ or WRITE cycles).
  typedef enum logic [1:0] {
    WB_NONE  = 2'd0,
    WB_READ  = 2'd1,
    WB_WRITE = 2'd2
  } wb_trcode_e;

  // PPCI address map of the DES wrapper (K0ADDR .. C1ADDR); one 32-bit
  // register per word address.
  localparam logic [7:0] K0ADDR = 8'h00;
  localparam logic [7:0] K1ADDR = 8'h04;
  localparam logic [7:0] T0ADDR = 8'h08;
  localparam logic [7:0] T1ADDR = 8'h0C;
  localparam logic [7:0] C0ADDR = 8'h10;
  localparam logic [7:0] C1ADDR = 8'h14;

  // An ATM cell on UTOPIA is 53 bytes.
  localparam int unsigned UTOPIA_CELL_BYTES = 53;

endpackage
