// wishbone_master_ipc: master interface protocol component for a Wishbone
// bus, classic single read and write cycles.
//
// The core asks for a READ or a WRITE by putting its code on trcode, with
// the address on addr_p (shared by READ and WRITE) and, for a write, the word
// on write_data.  The IPC raises CYC_O and STB_O with WE_O, ADR_O and DAT_O,
// holds them until it samples ACK_I high at a rising edge, and ends the
// transaction in that cycle: trend, addr_p_request and write_data_request
// (WRITE) or read_data_load with read_data = DAT_I (READ).  The core must
// hold its code until trend and its arguments through the trend cycle.
//
// Timing: CYC_O/STB_O rise in the cycle after trcode is seen and fall after
// the ACK cycle, so with a slave that acknowledges in the second cycle a
// transfer takes three cycles; every cycle without ACK_I is a wait state
// the slave inserts.  Address, write data and read data are wired through;
// only the state and the transaction code are stored.
// Wishbone IPCs are part of the IPC set of the methodology, which does not
// spell out their description; this one follows the public Wishbone classic
// cycle.  The widths, the absence of SEL (the port granularity is the whole
// word), the missing ERR/RTY inputs and the encodings are this design's
// choices.
module wishbone_master_ipc
  import ipc_pkg::*;
#(
  parameter int unsigned ADR_W = 32,
  parameter int unsigned DAT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // Wishbone interface ports
  output logic             CYC_O,
  output logic             STB_O,
  output logic             WE_O,
  output logic [ADR_W-1:0] ADR_O,
  output logic [DAT_W-1:0] DAT_O,
  input  logic             ACK_I,
  input  logic [DAT_W-1:0] DAT_I,
  // core ports
  input  wb_trcode_e       trcode,
  output logic             trend,
  input  logic [ADR_W-1:0] addr_p,
  output logic             addr_p_request,
  input  logic [DAT_W-1:0] write_data,
  output logic             write_data_request,
  output logic [DAT_W-1:0] read_data,
  output logic             read_data_load
);

  typedef enum logic {S_IDLE, S_CYC} state_e;
  state_e     state;
  wb_trcode_e op_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= WB_NONE;
    end else begin
      unique case (state)
        S_IDLE: if (trcode != WB_NONE) begin
          op_q  <= trcode;
          state <= S_CYC;
        end
        S_CYC: if (ACK_I) begin
          op_q  <= WB_NONE;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic fin;
  assign fin = (state == S_CYC) && ACK_I;

  assign CYC_O              = (state == S_CYC);
  assign STB_O              = (state == S_CYC);
  assign WE_O               = (op_q == WB_WRITE);
  assign ADR_O              = addr_p;       // bypasses
  assign DAT_O              = write_data;
  assign read_data          = DAT_I;
  assign trend              = fin;
  assign addr_p_request     = fin;
  assign write_data_request = fin && (op_q == WB_WRITE);
  assign read_data_load     = fin && (op_q == WB_READ);

  // the core keeps its code until the transaction ends and its arguments
  // through the ending cycle
  a_core_holds_code: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_CYC) |-> (ACK_I || trcode == op_q))
    else $error("core withdrew a Wishbone request before it ended");
  a_core_holds_args: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_CYC && !ACK_I) |=> ($stable(addr_p)
                                    && (op_q == WB_READ || $stable(write_data))))
    else $error("core changed Wishbone arguments before the transaction ended");

endmodule
