// tb_sram_master_ipc: self-checking test of the SRAM master IPC on its own.
//
// The test plays the core: it raises a READ or WRITE code with the
// arguments, and makes the arguments valid only after a random number of
// cycles (for a WRITE the address and the data may become valid in different
// cycles).  It checks that the IPC waits without touching the SRAM until
// everything it needs is valid, that the request strobes come in the cycle
// the arguments are taken, the SRAM pins in the access cycle, trend one cycle
// after the start for a WRITE and two for a READ, and that every read word
// equals a reference copy of the memory kept here.
module tb_sram_master_ipc;
  import ipc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         CSn, WEn;
  logic [7:0]   A;
  logic [31:0]  D, Q;
  sram_trcode_e trcode = SR_NONE;
  logic         trend;
  logic [7:0]   addr_p = '0;
  logic         addr_p_request, addr_p_valid = 1'b0;
  logic [31:0]  wdata_p = '0;
  logic         wdata_p_request, wdata_p_valid = 1'b0;
  logic [31:0]  rdata_p;
  logic         rdata_p_load;

  sram_master_ipc #(.AW(8), .DW(32)) dut (.*);
  sram_model #(.AW(8), .DW(32)) u_mem (.clk, .CSn, .WEn, .A, .D, .Q);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] ref_mem [256];
  int unsigned waits = 0;

  // one transaction; da/dd: cycles before address / write data become valid
  task automatic xact(input bit wr, input logic [7:0] a, input logic [31:0] d,
                      input int da, input int dd);
    int n = wr ? ((da > dd) ? da : dd) : da;
    trcode = wr ? SR_WRITE : SR_READ;
    addr_p = a;
    wdata_p = d;
    for (int c = 0; c <= n; c++) begin
      addr_p_valid  = (c >= da);
      wdata_p_valid = (c >= dd);
      #1;
      if (c < n) begin
        check(!addr_p_request && !wdata_p_request, "no request while waiting");
        waits++;
      end else begin
        check(addr_p_request, "address requested when valid");
        check(wdata_p_request == wr, "write data requested only by WRITE");
      end
      check(!trend, "no trend before the access");
      @(negedge clk);
      if (c < n) check(CSn, "SRAM untouched while waiting");
    end
    addr_p_valid = 1'b0;
    wdata_p_valid = 1'b0;
    // access cycle
    check(!CSn && (WEn == !wr) && (A == a), "SRAM access cycle");
    if (wr) begin
      check(D == d, "SRAM write data");
      check(trend, "WRITE ends in the access cycle");
      ref_mem[a] = d;
      @(negedge clk);
    end else begin
      check(!trend && !rdata_p_load, "READ still running in the access cycle");
      @(negedge clk);
      check(CSn, "single access per READ");
      check(trend && rdata_p_load, "READ ends with the load strobe");
      check(rdata_p == ref_mem[a], $sformatf("read %02h gave %08h, expected %08h", a, rdata_p, ref_mem[a]));
      @(negedge clk);
    end
    trcode = SR_NONE;
    #1;
    check(!trend && !rdata_p_load, "no trend after the end");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_mem[k]) ref_mem[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // valid arguments without a transaction code start nothing
    addr_p_valid = 1'b1; wdata_p_valid = 1'b1;
    repeat (3) begin
      #1 check(!addr_p_request && !wdata_p_request, "no request without a code");
      @(negedge clk);
      check(CSn, "no access without a code");
    end
    addr_p_valid = 1'b0; wdata_p_valid = 1'b0;
    for (int k = 0; k < 600; k++) begin
      automatic bit wr = (k < 40) || ($urandom_range(0, 1) == 1);
      xact(wr, 8'($urandom_range(0, 47)), $urandom,
           $urandom_range(0, 3), $urandom_range(0, 3));
      // back to back or with a gap
      repeat ($urandom_range(0, 1)) @(negedge clk);
    end
    check(waits > 100, $sformatf("wait states exercised (%0d)", waits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
