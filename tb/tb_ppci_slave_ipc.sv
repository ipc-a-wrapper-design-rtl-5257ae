// tb_ppci_slave_ipc: self-checking test of the slave PPCI IPC.
//
// A small register file in the testbench plays the core.  The test issues
// PPCI writes and reads, checks the core strobes and transaction codes in
// each cycle, checks that a write is acknowledged one cycle after it is
// raised (two cycles per transfer), and that a read is held in wait states
// for exactly as long as read_data_valid is low.
module tb_ppci_slave_ipc;
  import ipc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         VAL = 1'b0, RNW = 1'b0, EOP = 1'b0, ACK;
  logic [7:0]   ADDRESS = '0;
  logic [31:0]  WData = '0, RData;
  ppci_trcode_e trcode;
  logic         trend, addr_p_load, write_data_load, read_data_request;
  logic [7:0]   addr_p;
  logic [31:0]  write_data, read_data;
  logic         read_data_valid = 1'b1;

  ppci_slave_ipc dut (.*);

  logic [31:0] regs [256];
  always_ff @(posedge clk)
    if (write_data_load) regs[addr_p] <= write_data;
  assign read_data = regs[addr_p];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // write: raise at a falling edge, expect ACK in the next cycle
  task automatic ppci_write(input logic [7:0] a, input logic [31:0] d);
    VAL = 1'b1; RNW = 1'b0; ADDRESS = a; WData = d;
    #1;
    check(write_data_load && addr_p_load && trcode == PPCI_WRITE && !ACK,
          "write recognised in its first cycle");
    check(write_data == d && addr_p == a, "write arguments passed through");
    @(negedge clk);
    check(ACK && trend && trcode == PPCI_WRITE && !write_data_load,
          "write acknowledged in the second cycle");
    @(negedge clk);
    VAL = 1'b0;
    check(regs[a] == d, "core stored the written word");
  endtask

  // read with `wait_cycles` cycles of read_data_valid low
  task automatic ppci_read(input logic [7:0] a, input int wait_cycles);
    int n = 0;
    VAL = 1'b1; RNW = 1'b1; ADDRESS = a;
    read_data_valid = (wait_cycles == 0);
    #1;
    while (!ACK) begin
      check(trcode == PPCI_READ && !read_data_request, "read pending");
      @(negedge clk);
      n++;
      if (n >= wait_cycles) read_data_valid = 1'b1;
      #1;
      if (n > 100) break;
    end
    check(n == wait_cycles + 1, $sformatf("read ACK after %0d cycles, expected %0d",
                                          n, wait_cycles + 1));
    check(RData == regs[a] && read_data_request && trend, "read data and strobes at ACK");
    @(negedge clk);
    VAL = 1'b0;
    #1;
    check(!ACK, "ACK is a single cycle");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (regs[k]) regs[k] = 32'(k) * 32'h01010101;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!ACK && trcode == PPCI_NONE, "idle after reset");
    for (int t = 0; t < 40; t++) begin
      automatic logic [7:0]  a = 8'($urandom);
      automatic logic [31:0] d = $urandom;
      ppci_write(a, d);
      ppci_read(a, t % 4);
      check(regs[a] == d, "read-back value");
    end
    // back-to-back writes: two cycles each
    begin
      longint t0;
      @(negedge clk);
      t0 = $time;
      for (int k = 0; k < 8; k++) ppci_write(8'(k), 32'hA5A5_0000 + 32'(k));
      check(($time - t0) == 8 * 2 * 10, $sformatf("back-to-back writes took %0d ns", $time - t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
