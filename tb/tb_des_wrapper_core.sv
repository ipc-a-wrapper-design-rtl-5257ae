// tb_des_wrapper_core: self-checking test of the PPCI-to-DES controller.
//
// The testbench drives the core ports of both IPCs directly.  It writes the
// key and text words, checks that the right DES transaction is requested only
// once all four are valid, that the request strobes consume them and that
// reads wait (read_data_valid low) until the result has been loaded, then
// reads the two result words through the read multiplexer.
module tb_des_wrapper_core;
  import ipc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ppci_trcode_e pvci_trcode = PPCI_NONE;
  logic         pvci_trend = 1'b0;
  logic [7:0]   addr_p = '0;
  logic         addr_p_load = 1'b0;
  logic [31:0]  write_data = '0, read_data;
  logic         write_data_load = 1'b0, read_data_request = 1'b0, read_data_valid;
  des_trcode_e  des_trcode;
  logic         des_trend = 1'b0;
  logic [63:0]  key_p, odata_p, idata_p = '0;
  logic         key_p_request = 1'b0, odata_p_request = 1'b0, idata_p_load = 1'b0;

  des_wrapper_core dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    pvci_trcode = PPCI_WRITE; addr_p = a; addr_p_load = 1'b1;
    write_data = d; write_data_load = 1'b1;
    @(negedge clk);
    pvci_trcode = PPCI_NONE; addr_p_load = 1'b0; write_data_load = 1'b0;
  endtask

  // one read: address cycle, then the serving cycle
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    pvci_trcode = PPCI_READ; addr_p = a; addr_p_load = 1'b1;
    #1;
    check(read_data == '0, "read port idle before the request");
    @(negedge clk);
    addr_p_load = 1'b0; read_data_request = 1'b1; pvci_trend = 1'b1;
    #1 d = read_data;
    @(negedge clk);
    read_data_request = 1'b0; pvci_trend = 1'b0; pvci_trcode = PPCI_NONE;
  endtask

  // the DES side: accept the request, return `res` after `lat` cycles
  task automatic des_serve(input des_trcode_e op, input logic [63:0] k,
                           input logic [63:0] t, input logic [63:0] res, input int lat);
    check(des_trcode == op, $sformatf("operation %s requested", op.name()));
    check(key_p == k && odata_p == t, "64-bit arguments assembled from the words");
    key_p_request = 1'b1; odata_p_request = 1'b1;
    @(negedge clk);
    key_p_request = 1'b0; odata_p_request = 1'b0;
    check(des_trcode == DES_NONE, "arguments consumed");
    repeat (lat) begin
      check(!read_data_valid, "reads wait while DES runs");
      @(negedge clk);
    end
    idata_p = res; idata_p_load = 1'b1; des_trend = 1'b1;
    @(negedge clk);
    idata_p_load = 1'b0; des_trend = 1'b0;
    check(read_data_valid, "reads allowed after the result");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r0, r1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(des_trcode == DES_NONE && read_data_valid, "idle after reset");
    for (int t = 0; t < 30; t++) begin
      automatic logic [31:0] k0 = $urandom, k1 = $urandom, d0 = $urandom, d1 = $urandom;
      automatic logic [63:0] res = {$urandom, $urandom};
      automatic bit dec = t[0];
      // write order varies; the operation is only requested after the last
      wr(K1ADDR, k1);
      check(des_trcode == DES_NONE, "no request with one word");
      wr(dec ? C0ADDR : T0ADDR, d0);
      wr(8'h40, 32'hDEAD_BEEF);      // unmapped address: ignored
      wr(K0ADDR, k0);
      check(des_trcode == DES_NONE && read_data_valid, "no request with three words");
      wr(dec ? C1ADDR : T1ADDR, d1);
      check(!read_data_valid, "reads wait once armed");
      des_serve(dec ? DES_DECR : DES_ENCR, {k0, k1}, {d0, d1}, res, t % 5);
      rd(dec ? T0ADDR : C0ADDR, r0);
      rd(dec ? T1ADDR : C1ADDR, r1);
      check({r0, r1} == res, "result words read back");
      rd(K0ADDR, r0);
      check(r0 == 32'h0, "non-result address reads zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
