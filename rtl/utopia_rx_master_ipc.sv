// utopia_rx_master_ipc: master (ATM-layer side) interface protocol component
// for the UTOPIA receive interface.
//
// It executes one transaction, Receive, which moves a 53-byte ATM cell from
// the physical layer into a FIFO in the core.  The core puts UR_RECEIVE on
// trcode when it wants a cell; the IPC hands every received byte to the core
// on data with a data_load strobe, and raises trend with the 53rd byte.
//
// Protocol, cell-level handshake: RxClav high means the PHY holds a whole
// cell.  The master asks for a byte by driving RxEnbn low in a cycle; the PHY
// samples that at the rising edge and drives the byte on RxData in the next
// cycle, with RxSOC marking the first byte of a cell.  The master drives the
// clock out on RxClk.
//
// Flow control from the core: data_full high means the core FIFO has room
// for at most two more bytes, the ones that may already be on their way.
// While it is high RxEnbn stays high, which pauses the cell.
//
// Timing: a cell starts at the first edge that sees trcode, RxClav and
// data_full low; RxEnbn is low in the next 53 cycles (fewer if paused) and
// each byte arrives one cycle after its enable, so an unpaused cell takes 54
// cycles after that edge and trend is high in the last of them.  RxEnbn
// comes from a flip-flop; RxData is wired through to data.
// UTOPIA receive IPCs belong to the IPC set of the methodology, which does
// not spell out their description; the handshake is the standard UTOPIA
// Level 1 cell-level one, mirrored from the transmit description.  The
// counters, the two-byte meaning of data_full and the state encoding are
// this design's own.
module utopia_rx_master_ipc
  import ipc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // UTOPIA receive interface ports
  output logic              RxEnbn,
  output logic              RxClk,
  input  logic [7:0]        RxData,
  input  logic              RxSOC,
  input  logic              RxClav,
  // core ports
  input  utopia_rx_trcode_e trcode,
  output logic              trend,
  output logic [7:0]        data,
  output logic              data_load,
  input  logic              data_full
);

  typedef enum logic {S_IDLE, S_RECV} state_e;
  state_e     state;
  logic [5:0] e;        // bytes asked for in this cell
  logic [5:0] i;        // bytes received in this cell
  logic       enbn_q;   // RxEnbn
  logic       byte_v;   // a byte asked for in the previous cycle is on RxData

  localparam logic [5:0] CELL = 6'(UTOPIA_CELL_BYTES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      e      <= '0;
      i      <= '0;
      enbn_q <= 1'b1;
      byte_v <= 1'b0;
    end else begin
      byte_v <= !enbn_q;
      unique case (state)
        S_IDLE: begin
          enbn_q <= 1'b1;
          if (trcode == UR_RECEIVE && RxClav && !data_full) begin
            enbn_q <= 1'b0;
            e      <= 6'd1;
            i      <= '0;
            state  <= S_RECV;
          end
        end
        S_RECV: begin
          if (e != CELL && !data_full) begin
            enbn_q <= 1'b0;
            e      <= e + 6'd1;
          end else enbn_q <= 1'b1;
          if (byte_v) begin
            i <= i + 6'd1;
            if (i == CELL - 6'd1) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign RxEnbn    = enbn_q;
  assign RxClk     = clk;
  assign data      = RxData;
  assign data_load = byte_v;
  assign trend     = byte_v && (i == CELL - 6'd1);

  // RxSOC marks exactly the first byte of a cell
  a_soc_first: assert property (@(posedge clk) disable iff (!rst_n)
    byte_v |-> (RxSOC == (i == 6'd0)))
    else $error("RxSOC not on the first byte of the cell");

endmodule
