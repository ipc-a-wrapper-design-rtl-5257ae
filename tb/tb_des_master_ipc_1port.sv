// tb_des_master_ipc_1port: self-checking test of the DES master IPC with one
// shared outgoing argument port.
//
// The testbench core holds four argument registers (ENCR.key, ENCR.data,
// DECR.key, DECR.cdata) and drives odata_p through a multiplexer selected by
// the transaction it issued and odata_p_request, as a core for this IPC
// would.  Checked: the request sequence 01 then 10, never 11; the DES IP
// model receives the right key, text and direction; the result and its load
// strobe; the transaction length (model latency + 4); no start while busy.
module tb_des_master_ipc_1port;
  import ipc_pkg::*;
  import tb_cipher_pkg::*;

  localparam int unsigned LAT = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, enc_dec, done, busy, busy_ip, trend, idata_p_load;
  logic        busy_extra = 1'b0;
  logic [63:0] pkey, ptext, ctext, odata_p, idata_p;
  logic [1:0]  odata_p_request;
  des_trcode_e trcode = DES_NONE;
  assign busy = busy_ip || busy_extra;

  des_master_ipc_1port dut (.*);
  des_ip_model #(.LATENCY(LAT)) u_ip (.clk, .rst_n, .start, .enc_dec, .pkey, .ptext,
                                      .done, .busy(busy_ip), .ctext);

  // core: four argument registers behind one port
  logic [63:0] encr_key = '0, encr_data = '0, decr_key = '0, decr_cdata = '0;
  des_trcode_e issued = DES_NONE;
  always_comb begin
    unique case ({issued == DES_DECR, odata_p_request})
      3'b0_01: odata_p = encr_key;
      3'b0_10: odata_p = encr_data;
      3'b1_01: odata_p = decr_key;
      3'b1_10: odata_p = decr_cdata;
      default: odata_p = '0;
    endcase
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input des_trcode_e op, input logic [63:0] k, input logic [63:0] d);
    int unsigned n = 0;
    logic [1:0]  seq [$];
    logic [63:0] expect_res;
    expect_res = (op == DES_ENCR) ? toy_encrypt(k, d) : toy_decrypt(k, d);
    if (op == DES_ENCR) begin encr_key = k; encr_data = d; end
    else                begin decr_key = k; decr_cdata = d; end
    issued = op;
    trcode = op;
    forever begin
      #1;
      if (odata_p_request != 2'b00) seq.push_back(odata_p_request);
      if (start) begin
        check(pkey == k && ptext == d && enc_dec == (op == DES_ENCR), "DES IP arguments at start");
        trcode = DES_NONE;
      end
      if (trend) break;
      @(negedge clk);
      n++;
      if (n > 1000) break;
    end
    check(seq.size() == 2 && seq[0] == 2'b01 && seq[1] == 2'b10, "request sequence 01, 10");
    check(idata_p_load && idata_p == expect_res, "result with idata_p_load");
    check(n + 1 == LAT + 4, $sformatf("transaction took %0d cycles, expected %0d", n + 1, LAT + 4));
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
    check(!start && odata_p_request == 2'b00, "idle after reset");
    for (int t = 0; t < 20; t++) begin
      // both transactions' registers hold different values, so a wrong
      // select shows up in the result
      encr_key = {$urandom, $urandom}; encr_data = {$urandom, $urandom};
      decr_key = {$urandom, $urandom}; decr_cdata = {$urandom, $urandom};
      run(t[0] ? DES_DECR : DES_ENCR, {$urandom, $urandom}, {$urandom, $urandom});
      repeat (t % 3) @(negedge clk);
    end
    busy_extra = 1'b1;
    trcode = DES_ENCR;
    repeat (4) begin
      @(negedge clk);
      check(!start && odata_p_request == 2'b00, "waits while busy");
    end
    busy_extra = 1'b0;
    run(DES_ENCR, 64'hFEDC_BA98_7654_3210, 64'h0F0F_0F0F_F0F0_F0F0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
