// utopia_tx_slave_ipc: slave (physical-layer side) interface protocol
// component for the UTOPIA transmit interface.
//
// It recognises the Transmit transaction driven by an ATM-layer master and
// writes the 53 bytes of the cell into the core, one data_load strobe per
// byte.  The IPC is clocked by TxClk, which the master drives.  A byte is
// taken at each rising edge with TxEnbn low; a byte with TxSOC high starts a
// cell.  trcode reads UT_TRANSMIT from the first byte to the last, and trend
// is high in the cycle of byte 53.
//
// The core's status decides the flow control driven back to the master:
// TxClav follows cell_avail (room for a whole cell) and TxFulln is the
// inverse of data_full (room for at most four more bytes).
// The protocol follows the master-side description of UTOPIA transmit;
// the core status ports, the byte counter and the handling of a missing or
// misplaced SOC (the byte is ignored, and an assertion reports it) are this
// design's own.
module utopia_tx_slave_ipc
  import ipc_pkg::*;
(
  input  logic           TxClk,
  input  logic           rst_n,
  // UTOPIA transmit interface ports
  input  logic           TxSOC,
  input  logic           TxEnbn,
  input  logic [7:0]     TxData,
  output logic           TxFulln,
  output logic           TxClav,
  // core ports
  output utopia_trcode_e trcode,
  output logic           trend,
  output logic [7:0]     data,
  output logic           data_load,
  input  logic           data_full,
  input  logic           cell_avail
);

  logic       busy_q;   // inside a cell
  logic [5:0] cnt;      // bytes of the cell already received

  localparam logic [5:0] LAST = 6'(UTOPIA_CELL_BYTES - 1);

  logic take;
  assign take = !TxEnbn && (busy_q || TxSOC);

  always_ff @(posedge TxClk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      cnt    <= '0;
    end else if (take) begin
      if (cnt == LAST) begin
        busy_q <= 1'b0;
        cnt    <= '0;
      end else begin
        busy_q <= 1'b1;
        cnt    <= cnt + 6'd1;
      end
    end
  end

  assign data      = TxData;          // netlist bypass
  assign data_load = take;
  assign trcode    = (busy_q || (!TxEnbn && TxSOC)) ? UT_TRANSMIT : UT_NONE;
  assign trend     = take && (cnt == LAST);
  assign TxFulln   = !data_full;
  assign TxClav    = cell_avail;

  a_soc_only_first: assert property (@(posedge TxClk) disable iff (!rst_n)
    (busy_q && !TxEnbn) |-> !TxSOC)
    else $error("TxSOC inside a cell");
  a_soc_needed: assert property (@(posedge TxClk) disable iff (!rst_n)
    (!busy_q && !TxEnbn) |-> TxSOC)
    else $error("byte outside a cell");

endmodule
