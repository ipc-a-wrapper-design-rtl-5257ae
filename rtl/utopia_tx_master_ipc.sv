// utopia_tx_master_ipc: master (ATM-layer side) interface protocol component
// for the UTOPIA transmit interface.
//
// It executes one transaction, Transmit, which moves a 53-byte ATM cell from
// a FIFO in the core to the physical layer.  The core puts UT_TRANSMIT on
// trcode while a whole cell is in its FIFO; the IPC presents the FIFO head on
// data and pops it with data_request in every cycle in which a byte is on
// the bus.
//
// Protocol, octet-level handshake: a byte on TxData is taken by the PHY at a
// rising edge of TxClk while TxEnbn is low; TxSOC marks the first byte of a
// cell.  The cell starts only while TxClav is high.  TxFulln low means the
// PHY can take at most four more bytes: the byte of the cycle in which
// TxFulln is seen low is the first of those four, after the fourth TxEnbn
// goes high and the IPC waits until TxFulln is high again.  The clock is
// driven out on TxClk.
//
// A cell starts only while TxFulln is also high, so the four-byte allowance
// is never exceeded across the boundary of two cells.
//
// Timing: the first byte is on the bus in the cycle after trcode, TxClav and
// TxFulln are seen; without back-pressure one byte follows per cycle, so a cell takes
// 53 cycles, and trend is high in the cycle of byte 53.  TxEnbn and TxSOC
// come from flip-flops; TxData is the FIFO head wired through.
// The behaviour (start on TxClav, SOC on the first byte, four more bytes
// after TxFulln, then wait) and the registers i, j, TxEnbn, TxSOC and state
// follow the protocol description; j is 2 bits here since it counts to 4,
// and the counter widths and state encoding are this design's own.
module utopia_tx_master_ipc
  import ipc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  // UTOPIA transmit interface ports
  output logic           TxSOC,
  output logic           TxEnbn,
  output logic [7:0]     TxData,
  output logic           TxClk,
  input  logic           TxFulln,
  input  logic           TxClav,
  // core ports
  input  utopia_trcode_e trcode,
  output logic           trend,
  input  logic [7:0]     data,
  output logic           data_request
);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_HOLD} state_e;
  state_e     state;
  logic [5:0] i;      // index of the byte on the bus, 0..52
  logic [1:0] j;      // bytes sent since TxFulln was seen low, minus one
  logic       enbn_q, soc_q;
  logic       draining;

  localparam logic [5:0] LAST = 6'(UTOPIA_CELL_BYTES - 1);

  assign draining = (j != 2'd0) || !TxFulln;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      i      <= '0;
      j      <= '0;
      enbn_q <= 1'b1;
      soc_q  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (trcode == UT_TRANSMIT && TxClav && TxFulln) begin
          enbn_q <= 1'b0;
          soc_q  <= 1'b1;
          i      <= '0;
          j      <= '0;
          state  <= S_SEND;
        end
        S_SEND: begin
          soc_q <= 1'b0;
          if (i == LAST) begin
            enbn_q <= 1'b1;
            j      <= '0;
            state  <= S_IDLE;
          end else begin
            i <= i + 6'd1;
            if (draining) begin
              if (j == 2'd3) begin
                j      <= '0;
                enbn_q <= 1'b1;
                state  <= S_HOLD;
              end else begin
                j <= j + 2'd1;
              end
            end
          end
        end
        S_HOLD: if (TxFulln) begin
          enbn_q <= 1'b0;
          state  <= S_SEND;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign TxEnbn       = enbn_q;
  assign TxSOC        = soc_q;
  assign TxData       = data;         // netlist bypass of the FIFO head
  assign TxClk        = clk;
  assign data_request = (state == S_SEND);
  assign trend        = (state == S_SEND) && (i == LAST);

  // The PHY must stay full while the four remaining bytes are sent.
  a_full_while_draining: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SEND && j != 2'd0) |-> !TxFulln)
    else $error("TxFulln rose while the last four bytes were being sent");
  a_enable_matches_state: assert property (@(posedge clk) disable iff (!rst_n)
    (!TxEnbn) == (state == S_SEND))
    else $error("TxEnbn out of step with the send state");

endmodule
