// des_master_ipc: master interface protocol component for a DES IP.
//
// The core asks for a transaction by putting ENCR or DECR on trcode; the IPC
// runs it on the DES IP cycle by cycle and returns the result.  The 64-bit
// arguments reach the IP through shared core ports (the "core port"
// construct): key_p carries ENCR.key and DECR.key, odata_p carries ENCR.data
// and DECR.cdata, and idata_p returns ENCR.cdata and DECR.data.  Because each
// transaction puts only one argument on each shared port, every
// _request/_load strobe is one bit wide.  The 64-bit ports are wired straight
// through (the "netlist" construct), so the IPC itself holds only its state
// and the latched transaction code.
//
// DES IP protocol assumed here: the IP samples pkey, ptext and enc_dec in the
// cycle start is high, raises busy while it works, and pulses done for one
// cycle with the result on ctext.  enc_dec = 1 selects encryption.
//
// Timing: trcode is accepted in the idle state when busy is low (otherwise
// the IPC waits); the next cycle drives start and strobes key_p_request and
// odata_p_request; the cycle in which done is seen strobes idata_p_load and
// trend.  A transaction therefore lasts the IP latency plus two cycles.
// Port names follow the DES protocol description; the handshake of the DES IP
// and the enc_dec polarity are this design's assumptions.
module des_master_ipc
  import ipc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // DES interface ports
  output logic        start,
  output logic        enc_dec,
  output logic [63:0] pkey,
  output logic [63:0] ptext,
  input  logic        done,
  input  logic        busy,
  input  logic [63:0] ctext,
  // core ports
  input  des_trcode_e trcode,
  output logic        trend,
  input  logic [63:0] key_p,
  output logic        key_p_request,
  input  logic [63:0] odata_p,
  output logic        odata_p_request,
  output logic [63:0] idata_p,
  output logic        idata_p_load
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT} state_e;
  state_e      state;
  des_trcode_e op_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= DES_NONE;
    end else begin
      unique case (state)
        S_IDLE: if (trcode != DES_NONE && !busy) begin
          op_q  <= trcode;
          state <= S_START;
        end
        S_START: state <= S_WAIT;
        S_WAIT:  if (done) begin
          op_q  <= DES_NONE;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // netlist bypasses
  assign pkey    = key_p;
  assign ptext   = odata_p;
  assign idata_p = ctext;

  assign start           = (state == S_START);
  assign enc_dec         = (op_q == DES_ENCR);
  assign key_p_request   = (state == S_START);
  assign odata_p_request = (state == S_START);
  assign idata_p_load    = (state == S_WAIT) && done;
  assign trend           = (state == S_WAIT) && done;

  a_op_known: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_START) |-> (op_q == DES_ENCR || op_q == DES_DECR))
    else $error("DES IPC started without a transaction");

endmodule
