// utopia_rx_slave_ipc: slave (physical-layer side) interface protocol
// component for the UTOPIA receive interface.
//
// It recognises the Receive transaction run by an ATM-layer master and
// sends the 53 bytes of a cell from a FIFO in the core, popping the FIFO
// with data_request once per byte.  The IPC is clocked by RxClk, which the
// master drives.
//
// At each rising edge with RxEnbn low the IPC takes the FIFO head (data) and
// drives it on RxData in the next cycle, with RxSOC high for the first byte
// of the cell; data_request is high in the cycle RxEnbn is low, so the core
// pops at that edge.  trcode reads UR_RECEIVE from the first byte asked for
// to the last, and trend is high in the cycle the 53rd byte is asked for.
// RxClav follows the core status cell_avail, which the core raises while a
// whole cell is waiting (cell-level handshake).
// The handshake is the standard UTOPIA Level 1 cell-level one, mirrored
// from the transmit description; the core status port, the byte counter and
// the registered RxData/RxSOC are this design's own.
module utopia_rx_slave_ipc
  import ipc_pkg::*;
(
  input  logic              RxClk,
  input  logic              rst_n,
  // UTOPIA receive interface ports
  input  logic              RxEnbn,
  output logic [7:0]        RxData,
  output logic              RxSOC,
  output logic              RxClav,
  // core ports
  output utopia_rx_trcode_e trcode,
  output logic              trend,
  input  logic [7:0]        data,
  output logic              data_request,
  input  logic              cell_avail
);

  logic [5:0] cnt;      // bytes of the current cell already sent

  localparam logic [5:0] LAST = 6'(UTOPIA_CELL_BYTES - 1);

  always_ff @(posedge RxClk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      RxData <= '0;
      RxSOC  <= 1'b0;
    end else if (!RxEnbn) begin
      RxData <= data;
      RxSOC  <= (cnt == 6'd0);
      cnt    <= (cnt == LAST) ? 6'd0 : cnt + 6'd1;
    end
  end

  assign RxClav       = cell_avail;
  assign data_request = !RxEnbn;
  assign trend        = !RxEnbn && (cnt == LAST);
  assign trcode       = (!RxEnbn || cnt != 6'd0) ? UR_RECEIVE : UR_NONE;

  // a cell may only be started while the core announces one
  a_start_with_cell: assert property (@(posedge RxClk) disable iff (!rst_n)
    (!RxEnbn && cnt == 6'd0) |-> cell_avail)
    else $error("cell started while no cell was available");

endmodule
