// tb_des_slave_ipc: self-checking test of the DES slave IPC.
//
// The testbench plays a DES master (start with key, text and direction) and
// the DES core behind the IPC, which computes the reference transform and
// raises result_p_valid after a random number of cycles.  Checked: the
// transaction code and argument strobes in the start cycle, busy until the
// result, a one-cycle done with the result on ctext, and the total length
// (core delay + 2 cycles from start to done).
module tb_des_slave_ipc;
  import ipc_pkg::*;
  import tb_cipher_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start = 1'b0, enc_dec = 1'b0, done, busy;
  logic [63:0] pkey = '0, ptext = '0, ctext;
  des_trcode_e trcode;
  logic        trend, key_p_load, data_p_load, result_p_request;
  logic [63:0] key_p, data_p;
  logic [63:0] result_p = '0;
  logic        result_p_valid = 1'b0;

  des_slave_ipc dut (.*);

  // core: computes on the load strobes, result valid after `core_delay`
  int core_delay = 3, cnt = 0;
  bit running = 0;
  always_ff @(posedge clk) begin
    if (key_p_load && data_p_load) begin
      result_p       <= (trcode == DES_ENCR) ? toy_encrypt(key_p, data_p)
                                             : toy_decrypt(key_p, data_p);
      running        <= 1;
      cnt            <= 0;
      result_p_valid <= 1'b0;
    end else if (running) begin
      if (cnt == core_delay) begin
        result_p_valid <= 1'b1;
        running        <= 0;
      end else cnt <= cnt + 1;
    end else if (result_p_request) result_p_valid <= 1'b0;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic op(input bit enc, input logic [63:0] k, input logic [63:0] d, input int dly);
    int n = 0;
    core_delay = dly;
    start = 1'b1; enc_dec = enc; pkey = k; ptext = d;
    #1;
    check(trcode == (enc ? DES_ENCR : DES_DECR) && key_p_load && data_p_load
          && key_p == k && data_p == d, "transaction recognised at start");
    @(negedge clk);
    start = 1'b0; pkey = '1; ptext = '1;
    while (!done && n < 100) begin
      check(busy && trcode == (enc ? DES_ENCR : DES_DECR) && !trend, "busy while the core works");
      @(negedge clk);
      n++;
    end
    check(n == dly + 2, $sformatf("done after %0d cycles, expected %0d", n, dly + 2));
    check(!busy && trend && result_p_request, "done cycle strobes");
    check(ctext == (enc ? toy_encrypt(k, d) : toy_decrypt(k, d)), "result on ctext");
    @(negedge clk);
    check(!done && !busy && trcode == DES_NONE, "done is one cycle");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && trcode == DES_NONE, "idle after reset");
    for (int t = 0; t < 30; t++) begin
      op(t[0], {$urandom, $urandom}, {$urandom, $urandom}, t % 6);
      repeat (t % 2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
