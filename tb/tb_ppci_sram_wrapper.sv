// tb_ppci_sram_wrapper: end-to-end test of the PPCI-to-SRAM wrapper.
//
// A PPCI master (tasks below) issues random WRITEs and READs to random
// addresses of the SRAM model, with random idle gaps, and compares every read
// word with a reference copy of the memory kept here.  Also checked: a WRITE
// is acknowledged one cycle after VAL is first sampled and a READ three
// cycles after (SRAM access plus its read latency: the wait states inserted
// by the direct connection), each PPCI transaction causes exactly one SRAM
// access, and a read right after a write to the same address sees the new
// word.
module tb_ppci_sram_wrapper;
  import ipc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        VAL = 1'b0, RNW = 1'b0, EOP = 1'b0, ACK;
  logic [7:0]  ADDRESS = '0;
  logic [31:0] WData = '0, RData;
  logic        CSn, WEn;
  logic [7:0]  A;
  logic [31:0] D, Q;

  ppci_sram_wrapper dut (.*);
  sram_model #(.AW(8), .DW(32)) u_mem (.clk, .CSn, .WEn, .A, .D, .Q);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // PPCI master: raise at a falling edge, hold until ACK is seen high
  task automatic ppci(input bit rnw, input logic [7:0] a, input logic [31:0] d,
                      output logic [31:0] q, output int cycles);
    VAL = 1'b1; RNW = rnw; ADDRESS = a; WData = d; EOP = 1'b1;
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!ACK && cycles < 1000);
    q = RData;
    @(negedge clk);
    VAL = 1'b0; EOP = 1'b0;
  endtask

  logic [31:0] ref_mem [256];
  int unsigned n_wr = 0, n_rd = 0;
  int unsigned w0 = 0, r0 = 0;   // accesses before reset ended

  task automatic do_write(input logic [7:0] a, input logic [31:0] d);
    logic [31:0] q;
    int c;
    ppci(1'b0, a, d, q, c);
    check(c == 1, $sformatf("write acknowledged after %0d cycle(s), expected 1", c));
    ref_mem[a] = d;
    n_wr++;
  endtask

  task automatic do_read(input logic [7:0] a);
    logic [31:0] q;
    int c;
    ppci(1'b1, a, '0, q, c);
    check(c == 3, $sformatf("read acknowledged after %0d cycle(s), expected 3", c));
    check(q == ref_mem[a], $sformatf("read %02h gave %08h, expected %08h", a, q, ref_mem[a]));
    n_rd++;
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
    check(CSn, "SRAM idle after reset");
    w0 = u_mem.writes;
    r0 = u_mem.reads;
    // fill a block of addresses, then read them back
    for (int k = 0; k < 32; k++) do_write(8'(k * 3), $urandom);
    for (int k = 0; k < 32; k++) do_read(8'(k * 3));
    // write then read the same address back to back
    for (int k = 0; k < 16; k++) begin
      automatic logic [7:0] a = 8'($urandom);
      do_write(a, $urandom);
      do_read(a);
    end
    // random mix with random gaps
    for (int k = 0; k < 400; k++) begin
      automatic logic [7:0] a = 8'($urandom_range(0, 31));
      if ($urandom_range(0, 1) != 0) do_write(a, $urandom);
      else                      do_read(a);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (2) @(negedge clk);
    check(u_mem.writes - w0 == n_wr, $sformatf("%0d SRAM writes for %0d PPCI writes", u_mem.writes, n_wr));
    check(u_mem.reads - r0 == n_rd, $sformatf("%0d SRAM reads for %0d PPCI reads", u_mem.reads, n_rd));
    check(CSn, "SRAM idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
