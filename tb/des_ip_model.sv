// des_ip_model: behavioural model of a DES IP with the start/busy/done
// handshake, for the testbenches only.  It is not DES: it applies the toy
// transform of tb_cipher_pkg.  It samples pkey, ptext and enc_dec (1 =
// encrypt) in the cycle start is high, keeps busy high after it and pulses
// done for one cycle LATENCY cycles after the start cycle (LATENCY >= 2),
// with the result on ctext, which it holds
// until the next start.
module des_ip_model
  import tb_cipher_pkg::*;
#(
  parameter int unsigned LATENCY = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        enc_dec,
  input  logic [63:0] pkey,
  input  logic [63:0] ptext,
  output logic        done,
  output logic        busy,
  output logic [63:0] ctext
);
  int unsigned cnt;
  logic [63:0] result;
  int unsigned starts = 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= 0;
      busy   <= 1'b0;
      done   <= 1'b0;
      ctext  <= '0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        result <= enc_dec ? toy_encrypt(pkey, ptext) : toy_decrypt(pkey, ptext);
        busy   <= 1'b1;
        cnt    <= LATENCY - 1;
        starts <= starts + 1;
      end else if (busy) begin
        if (cnt == 1) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          ctext <= result;
        end
        cnt <= cnt - 1;
      end
    end
  end

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy) else $error("start while the DES IP is busy");
endmodule
