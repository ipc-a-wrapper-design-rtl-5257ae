// ppci_sram_wrapper: PPCI-to-SRAM wrapper built from two interface protocol
// components connected directly, with no controller between them.
//
// A PPCI bus master reads and writes a synchronous SRAM.  The PPCI slave IPC
// recognises READ and WRITE on the bus; the SRAM master IPC runs the same
// transaction on the SRAM at the same time.  Because nothing is stored in
// between, every argument port of one IPC is wired to the matching port of
// the other, and the load strobe of the side that receives an argument
// becomes the valid input of the side that sends it on:
//   PPCI addr_p_load      -> SRAM addr_p_valid
//   PPCI write_data_load  -> SRAM wdata_p_valid
//   SRAM rdata_p_load     -> PPCI read_data_valid
// so each IPC inserts wait states until the other has the data.  The
// transaction code passes straight through (the two protocols use the same
// codes for READ and WRITE).  The SRAM address is the PPCI ADDRESS.
//
// Timing on the PPCI side: a WRITE is acknowledged in the second cycle of
// VAL (the SRAM is written in that cycle); a READ is acknowledged in the
// fourth cycle of VAL, after the SRAM access and its one-cycle read latency.
// The direct connection and the load-to-valid rule follow the methodology;
// the SRAM pin protocol is that of sram_master_ipc and is this design's
// own choice.
module ppci_sram_wrapper
  import ipc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // PPCI interface
  input  logic        VAL,
  input  logic        RNW,
  input  logic [7:0]  ADDRESS,
  input  logic        EOP,
  input  logic [31:0] WData,
  output logic        ACK,
  output logic [31:0] RData,
  // SRAM interface
  output logic        CSn,
  output logic        WEn,
  output logic [7:0]  A,
  output logic [31:0] D,
  input  logic [31:0] Q
);

  ppci_trcode_e ppci_trcode;
  sram_trcode_e sram_trcode;
  logic [7:0]   addr_p;
  logic         addr_p_load;
  logic [31:0]  write_data;
  logic         write_data_load;
  logic [31:0]  read_data;
  logic         read_data_load;

  // same numeric codes on both sides: a plain connection
  assign sram_trcode = sram_trcode_e'(ppci_trcode);

  ppci_slave_ipc u_ppci (
    .clk, .rst_n,
    .VAL, .RNW, .ADDRESS, .EOP, .WData, .ACK, .RData,
    .trcode            (ppci_trcode),
    .trend             (),
    .addr_p            (addr_p),
    .addr_p_load       (addr_p_load),
    .write_data        (write_data),
    .write_data_load   (write_data_load),
    .read_data         (read_data),
    .read_data_request (),
    .read_data_valid   (read_data_load)
  );

  sram_master_ipc #(.AW(8), .DW(32)) u_sram (
    .clk, .rst_n,
    .CSn, .WEn, .A, .D, .Q,
    .trcode          (sram_trcode),
    .trend           (),
    .addr_p          (addr_p),
    .addr_p_request  (),
    .addr_p_valid    (addr_p_load),
    .wdata_p         (write_data),
    .wdata_p_request (),
    .wdata_p_valid   (write_data_load),
    .rdata_p         (read_data),
    .rdata_p_load    (read_data_load)
  );

endmodule
