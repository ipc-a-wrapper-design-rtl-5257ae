// tb_des_master_ipc: self-checking test of the master DES IPC.
//
// The testbench plays the core (request code and argument registers) and
// connects the DES IP model.  Each transaction is checked for the start
// pulse and its arguments, the request strobes, the returned result against
// the reference transform, and the transaction length (model latency + 2).
// A request made while the IP is busy must wait.
module tb_des_master_ipc;
  import ipc_pkg::*;
  import tb_cipher_pkg::*;

  localparam int unsigned LAT = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, enc_dec, done, busy, busy_ip, trend;
  logic        busy_extra = 1'b0;   // lets the test hold the IPC off
  assign busy = busy_ip || busy_extra;
  logic [63:0] pkey, ptext, ctext, key_p = '0, odata_p = '0, idata_p;
  logic        key_p_request, odata_p_request, idata_p_load;
  des_trcode_e trcode = DES_NONE;

  des_master_ipc dut (.*);
  des_ip_model #(.LATENCY(LAT)) u_ip (.clk, .rst_n, .start, .enc_dec, .pkey, .ptext,
                                      .done, .busy(busy_ip), .ctext);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // run one transaction; returns its length in cycles (trcode to trend)
  task automatic run(input des_trcode_e op, input logic [63:0] k,
                     input logic [63:0] d, input int unsigned expect_len);
    int unsigned n = 0;
    bit seen_start = 0, seen_req = 0;
    logic [63:0] expect_res;
    expect_res = (op == DES_ENCR) ? toy_encrypt(k, d) : toy_decrypt(k, d);
    trcode = op; key_p = k; odata_p = d;
    forever begin
      #1;
      if (start) begin
        check(!seen_start, "one start pulse");
        seen_start = 1;
        check(pkey == k && ptext == d && enc_dec == (op == DES_ENCR),
              "DES IP arguments at start");
        check(key_p_request && odata_p_request, "argument requests with start");
        seen_req = 1;
        trcode = DES_NONE;         // the core drops its request once served
      end else begin
        check(!key_p_request && !odata_p_request, "no stray requests");
      end
      if (trend) break;
      @(negedge clk);
      n++;
      if (n > 1000) break;
    end
    check(seen_start && seen_req, "transaction started");
    check(idata_p_load && idata_p == expect_res, "result delivered with idata_p_load");
    check(n + 1 == expect_len, $sformatf("transaction took %0d cycles, expected %0d",
                                         n + 1, expect_len));
    @(negedge clk);
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
    check(!start && !trend, "idle after reset");
    for (int t = 0; t < 20; t++) begin
      automatic logic [63:0] k = {$urandom, $urandom};
      automatic logic [63:0] d = {$urandom, $urandom};
      run((t % 2) ? DES_DECR : DES_ENCR, k, d, LAT + 2);
      repeat (t % 3) @(negedge clk);
    end
    // a request while the IP is busy waits for busy to fall
    busy_extra = 1'b1;
    trcode = DES_ENCR;
    repeat (5) begin
      @(negedge clk);
      check(!start, "no start while busy");
    end
    busy_extra = 1'b0;
    run(DES_ENCR, 64'h0123_4567_89AB_CDEF, 64'h1111_2222_3333_4444, LAT + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
