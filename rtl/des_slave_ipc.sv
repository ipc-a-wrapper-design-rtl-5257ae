// des_slave_ipc: slave interface protocol component for the DES interface,
// placed in front of a DES core.
//
// It recognises the ENCR and DECR transactions a DES master starts and hands
// them to the core: in the cycle start is high it reports the code on trcode
// and strobes key_p_load and data_p_load with pkey and ptext wired through.
// It then keeps busy high until the core raises result_p_valid, and in the
// next cycle pulses done with the core's result_p driven on ctext, strobing
// result_p_request and trend.  key_p carries ENCR.key/DECR.key, data_p
// ENCR.data/DECR.cdata and result_p ENCR.cdata/DECR.data, the shared core
// ports of the DES description seen from the slave side.
//
// Protocol (as assumed for the DES master IPC): pkey, ptext and enc_dec are
// valid in the start cycle, enc_dec = 1 means encrypt, busy is high from the
// cycle after start until done, done is a one-cycle pulse with ctext valid.
// A start while busy is a protocol error and is reported by an assertion.
// The port names on the core side and the result_p_valid status input are
// this design's own; the interface ports are those of the DES description.
module des_slave_ipc
  import ipc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // DES interface ports
  input  logic        start,
  input  logic        enc_dec,
  input  logic [63:0] pkey,
  input  logic [63:0] ptext,
  output logic        done,
  output logic        busy,
  output logic [63:0] ctext,
  // core ports
  output des_trcode_e trcode,
  output logic        trend,
  output logic [63:0] key_p,
  output logic        key_p_load,
  output logic [63:0] data_p,
  output logic        data_p_load,
  input  logic [63:0] result_p,
  output logic        result_p_request,
  input  logic        result_p_valid
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e      state;
  des_trcode_e op_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= DES_NONE;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          op_q  <= enc_dec ? DES_ENCR : DES_DECR;
          state <= S_RUN;
        end
        S_RUN:  if (result_p_valid) state <= S_DONE;
        S_DONE: begin
          op_q  <= DES_NONE;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic accept;
  assign accept = (state == S_IDLE) && start;

  assign key_p            = pkey;        // netlist bypasses
  assign data_p           = ptext;
  assign ctext            = result_p;
  assign key_p_load       = accept;
  assign data_p_load      = accept;
  assign trcode           = accept ? (enc_dec ? DES_ENCR : DES_DECR) : op_q;
  assign busy             = (state == S_RUN);
  assign done             = (state == S_DONE);
  assign result_p_request = (state == S_DONE);
  assign trend            = (state == S_DONE);

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (state == S_IDLE))
    else $error("DES start while a transaction is running");

endmodule
