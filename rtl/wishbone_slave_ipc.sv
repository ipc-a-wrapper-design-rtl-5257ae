// wishbone_slave_ipc: slave interface protocol component for a Wishbone
// bus, classic single read and write cycles.
//
// The IPC recognises a READ or a WRITE when CYC_I and STB_I are both high
// and reports it to the core as a transaction code plus argument ports; the
// core never sees the bus handshake.  The master holds CYC_I, STB_I, WE_I,
// ADR_I and, for a write, DAT_I until it samples ACK_O high.
//
// Core side:
//   trcode / trend        transaction being recognised / its last cycle
//   addr_p, addr_p_load   shared address port of READ and WRITE
//   write_data(_load)     write word, strobed in the cycle the core stores it
//   read_data(_request)   read word, taken from the core in the ACK cycle
//   read_data_valid       core status: the addressed word may be read now
//
// Timing: a WRITE is stored at the first edge that sees the strobe and ACK_O
// follows in the next cycle.  A READ waits, one wait state per cycle, while
// read_data_valid is low; once it is high, ACK_O is raised in the next
// cycle with DAT_O.  ACK_O is registered and is only ever high while the
// request that caused it is still raised, as the classic cycle requires.
// Wishbone IPCs are part of the IPC set of the methodology, which does not
// spell out their description; this one follows the public Wishbone classic
// cycle.  The widths, the absence of SEL, ERR and RTY, the read-wait status
// input and the encodings are this design's choices.
module wishbone_slave_ipc
  import ipc_pkg::*;
#(
  parameter int unsigned ADR_W = 32,
  parameter int unsigned DAT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // Wishbone interface ports
  input  logic             CYC_I,
  input  logic             STB_I,
  input  logic             WE_I,
  input  logic [ADR_W-1:0] ADR_I,
  input  logic [DAT_W-1:0] DAT_I,
  output logic             ACK_O,
  output logic [DAT_W-1:0] DAT_O,
  // core ports
  output wb_trcode_e       trcode,
  output logic             trend,
  output logic [ADR_W-1:0] addr_p,
  output logic             addr_p_load,
  output logic [DAT_W-1:0] write_data,
  output logic             write_data_load,
  input  logic [DAT_W-1:0] read_data,
  output logic             read_data_request,
  input  logic             read_data_valid
);

  typedef enum logic [1:0] {S_IDLE, S_WACK, S_RACK} state_e;
  state_e state, state_n;

  logic req;
  assign req = CYC_I && STB_I;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_n;
  end

  // bypasses between interface ports and core ports
  assign addr_p     = ADR_I;
  assign write_data = DAT_I;
  assign DAT_O      = read_data;

  always_comb begin
    state_n           = state;
    trcode            = WB_NONE;
    trend             = 1'b0;
    ACK_O             = 1'b0;
    addr_p_load       = 1'b0;
    write_data_load   = 1'b0;
    read_data_request = 1'b0;
    unique case (state)
      S_IDLE: if (req) begin
        addr_p_load = 1'b1;
        if (WE_I) begin
          trcode          = WB_WRITE;
          write_data_load = 1'b1;
          state_n         = S_WACK;
        end else begin
          trcode = WB_READ;
          if (read_data_valid) state_n = S_RACK;
        end
      end
      S_WACK: begin
        trcode  = WB_WRITE;
        ACK_O   = 1'b1;
        trend   = 1'b1;
        state_n = S_IDLE;
      end
      S_RACK: begin
        trcode            = WB_READ;
        ACK_O             = 1'b1;
        read_data_request = 1'b1;
        trend             = 1'b1;
        state_n           = S_IDLE;
      end
      default: state_n = S_IDLE;
    endcase
  end

  // Wishbone classic rule: the master keeps its request until ACK.
  a_hold_request: assert property (@(posedge clk) disable iff (!rst_n)
    (req && !ACK_O) |=> (req && $stable(WE_I) && $stable(ADR_I)
                         && (!WE_I || $stable(DAT_I))))
    else $error("Wishbone request changed before ACK");
  a_ack_only_with_strobe: assert property (@(posedge clk) disable iff (!rst_n)
    ACK_O |-> req)
    else $error("ACK_O without a request");

endmodule
