// des_master_ipc_1port: master DES IPC whose outgoing arguments all share one
// 64-bit core port.
//
// This variant shows port sharing carried further than in des_master_ipc.
// The core port odata_p carries four transaction arguments: ENCR.key,
// ENCR.data, DECR.key and DECR.cdata.  The IPC therefore fetches each
// transaction's two arguments one after the other.  odata_p_request is two
// bits wide and numbers the argument within the running transaction:
//   2'b00 no request, 2'b01 first argument (key), 2'b10 second argument
//   (data or cdata), 2'b11 unused.
// The transaction code is not part of the encoding, because the core issued
// it.  The core uses odata_p_request as the select of a multiplexer over its
// argument registers.  The result comes back on idata_p (ENCR.cdata or
// DECR.data) with a one-bit idata_p_load.
//
// Because key and text arrive in different cycles, pkey and ptext are
// registered here rather than wired through.  Sequence: idle (trcode seen,
// busy low) -> key cycle (request 01, pkey captured) -> text cycle (request
// 10, ptext captured) -> start cycle -> wait for done (idata_p_load and
// trend).  A transaction lasts the DES IP latency + 4 cycles.
// The four-argument sharing and the request encoding follow the port-sharing
// description; the DES handshake (see des_master_ipc), the enc_dec polarity
// (1 = encrypt), the fetch order and the reset are this design's choices.
module des_master_ipc_1port
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
  input  logic [63:0] odata_p,
  output logic [1:0]  odata_p_request,
  output logic [63:0] idata_p,
  output logic        idata_p_load
);

  typedef enum logic [2:0] {S_IDLE, S_KEY, S_TEXT, S_START, S_WAIT} state_e;
  state_e      state;
  des_trcode_e op_q;
  logic [63:0] pkey_q, ptext_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      op_q    <= DES_NONE;
      pkey_q  <= '0;
      ptext_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (trcode != DES_NONE && !busy) begin
          op_q  <= trcode;
          state <= S_KEY;
        end
        S_KEY: begin
          pkey_q <= odata_p;
          state  <= S_TEXT;
        end
        S_TEXT: begin
          ptext_q <= odata_p;
          state   <= S_START;
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

  always_comb begin
    unique case (state)
      S_KEY:   odata_p_request = 2'b01;
      S_TEXT:  odata_p_request = 2'b10;
      default: odata_p_request = 2'b00;
    endcase
  end

  assign pkey         = pkey_q;
  assign ptext        = ptext_q;
  assign idata_p      = ctext;          // netlist bypass
  assign start        = (state == S_START);
  assign enc_dec      = (op_q == DES_ENCR);
  assign idata_p_load = (state == S_WAIT) && done;
  assign trend        = (state == S_WAIT) && done;

  a_request_code: assert property (@(posedge clk) disable iff (!rst_n)
    odata_p_request != 2'b11)
    else $error("unused odata_p_request code");

endmodule
