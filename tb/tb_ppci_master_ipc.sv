// tb_ppci_master_ipc: self-checking test of the PPCI master IPC.
//
// The testbench plays the core (code and arguments, held until trend) and a
// PPCI slave with a register file that acknowledges after a random delay.
// Checked: writes reach the slave's registers, reads return them through
// read_data with read_data_load, the strobes appear only in the ending
// cycle, and a transaction lasts exactly 2 + (slave delay) cycles.
module tb_ppci_master_ipc;
  import ipc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         VAL, RNW, EOP, ACK;
  logic [7:0]   ADDRESS;
  logic [31:0]  WData, RData;
  ppci_trcode_e trcode = PPCI_NONE;
  logic         trend, addr_p_request, write_data_request, read_data_load;
  logic [7:0]   addr_p = '0;
  logic [31:0]  write_data = '0, read_data;

  ppci_master_ipc dut (.*);

  // PPCI slave: acknowledges `delay` cycles after it first sees VAL
  logic [31:0] regs [256];
  int          delay = 0, waited = 0;
  logic        ack_q = 1'b0;
  assign ACK   = ack_q;
  assign RData = regs[ADDRESS];
  always_ff @(posedge clk) begin
    if (ack_q) begin
      ack_q  <= 1'b0;
      waited <= 0;
    end else if (VAL) begin
      if (waited >= delay) begin
        ack_q <= 1'b1;
        if (!RNW) regs[ADDRESS] <= WData;
      end else waited <= waited + 1;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input ppci_trcode_e op, input logic [7:0] a,
                     input logic [31:0] d, input int dly, output logic [31:0] q);
    int n = 0;
    delay = dly;
    trcode = op; addr_p = a; write_data = d;
    forever begin
      #1;
      n++;
      if (VAL) check(ADDRESS == a && RNW == (op == PPCI_READ) && EOP && (op == PPCI_READ || WData == d),
                     "request signals");
      if (trend) break;
      check(!addr_p_request && !write_data_request && !read_data_load, "no early strobes");
      @(negedge clk);
      if (n > 100) break;
    end
    check(n == dly + 3, $sformatf("transaction took %0d cycles, expected %0d", n, dly + 3));
    check(addr_p_request && (write_data_request == (op == PPCI_WRITE))
          && (read_data_load == (op == PPCI_READ)), "ending strobes");
    q = read_data;
    @(negedge clk);
    trcode = PPCI_NONE;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    foreach (regs[k]) regs[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!VAL && !trend, "idle after reset");
    for (int t = 0; t < 40; t++) begin
      automatic logic [7:0]  a = 8'($urandom);
      automatic logic [31:0] d = $urandom;
      run(PPCI_WRITE, a, d, t % 3, q);
      check(regs[a] == d, "word written to the slave");
      run(PPCI_READ, a, '0, (t + 1) % 4, q);
      check(q == d, "word read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
