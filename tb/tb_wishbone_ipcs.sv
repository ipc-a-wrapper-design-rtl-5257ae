// tb_wishbone_ipcs: self-checking test of the Wishbone master and slave IPCs,
// joined pin to pin.
//
// The test plays the master's core (tasks below) and the slave's core, a
// 256-word register file that can hold a read back by keeping
// read_data_valid low for a chosen number of cycles.  Every transfer is
// checked at both cores: the word a WRITE stores (address, data, transaction
// code), the word a READ returns, and the number of cycles from the
// request to trend: 2 for a WRITE and 2 + the wait cycles for a READ.  The
// bus rules (request held until ACK, ACK only while requested) are checked
// by the IPCs' assertions.
module tb_wishbone_ipcs;
  import ipc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // bus
  logic        CYC, STB, WE, ACK;
  logic [31:0] ADR, DAT_M2S, DAT_S2M;
  // master core
  wb_trcode_e  m_trcode = WB_NONE;
  logic        m_trend, m_addr_p_request, m_write_data_request, m_read_data_load;
  logic [31:0] m_addr_p = '0, m_write_data = '0, m_read_data;
  // slave core
  wb_trcode_e  s_trcode;
  logic        s_trend, s_addr_p_load, s_write_data_load, s_read_data_request;
  logic [31:0] s_addr_p, s_write_data, s_read_data;
  logic        s_read_data_valid = 1'b1;

  wishbone_master_ipc u_m (
    .clk, .rst_n,
    .CYC_O (CYC), .STB_O (STB), .WE_O (WE), .ADR_O (ADR), .DAT_O (DAT_M2S),
    .ACK_I (ACK), .DAT_I (DAT_S2M),
    .trcode (m_trcode), .trend (m_trend),
    .addr_p (m_addr_p), .addr_p_request (m_addr_p_request),
    .write_data (m_write_data), .write_data_request (m_write_data_request),
    .read_data (m_read_data), .read_data_load (m_read_data_load));

  wishbone_slave_ipc u_s (
    .clk, .rst_n,
    .CYC_I (CYC), .STB_I (STB), .WE_I (WE), .ADR_I (ADR), .DAT_I (DAT_M2S),
    .ACK_O (ACK), .DAT_O (DAT_S2M),
    .trcode (s_trcode), .trend (s_trend),
    .addr_p (s_addr_p), .addr_p_load (s_addr_p_load),
    .write_data (s_write_data), .write_data_load (s_write_data_load),
    .read_data (s_read_data), .read_data_request (s_read_data_request),
    .read_data_valid (s_read_data_valid));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // slave core: register file indexed by the low address byte
  logic [31:0] regs [256];
  int          s_writes = 0, wcnt = 0;
  initial foreach (regs[k]) regs[k] = '0;
  always @(posedge clk) if (rst_n) begin
    if (s_write_data_load) begin
      check(s_trcode == WB_WRITE, "slave reports WRITE");
      regs[s_addr_p[7:0]] <= s_write_data;
      s_writes <= s_writes + 1;
    end
    if (s_addr_p_load && s_trcode == WB_READ && !s_read_data_valid) begin
      if (wcnt == 1) s_read_data_valid <= 1'b1;
      wcnt <= wcnt - 1;
    end
  end
  assign s_read_data = regs[s_addr_p[7:0]];

  // master core
  logic [31:0] ref_mem [256];
  int n_wr = 0, n_rd = 0, n_wait = 0;

  task automatic xfer(input bit wr, input logic [31:0] a, input logic [31:0] d,
                      input int w);
    int cycles = 0;
    m_trcode = wr ? WB_WRITE : WB_READ;
    m_addr_p = a;
    m_write_data = d;
    if (!wr) begin
      wcnt = w;
      s_read_data_valid = (w == 0);
    end
    do begin
      @(negedge clk);
      cycles++;
    end while (!m_trend && cycles < 1000);
    check(cycles == (wr ? 2 : 2 + w),
          $sformatf("%s took %0d cycles, expected %0d", wr ? "WRITE" : "READ", cycles, wr ? 2 : 2 + w));
    check(m_addr_p_request && m_write_data_request == wr && m_read_data_load == !wr,
          "master strobes in the ending cycle");
    check(s_trend && ACK, "slave ends in the same cycle");
    if (wr) begin
      ref_mem[a[7:0]] = d;
      n_wr++;
    end else begin
      check(m_read_data == ref_mem[a[7:0]],
            $sformatf("read %08h gave %08h, expected %08h", a, m_read_data, ref_mem[a[7:0]]));
      check(s_read_data_request, "slave took the read word from its core");
      n_rd++;
      if (w > 0) n_wait++;
    end
    m_trcode = WB_NONE;
    @(negedge clk);
    check(!CYC && !STB && !ACK, "bus idle after the transfer");
    s_read_data_valid = 1'b1;
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
    check(!CYC && !STB, "bus idle after reset");
    for (int k = 0; k < 500; k++) begin
      automatic logic [31:0] a = {24'($urandom), 8'($urandom_range(0, 31))};
      if (k < 32 || $urandom_range(0, 1) != 0) xfer(1'b1, a, $urandom, 0);
      else                                     xfer(1'b0, a, '0, $urandom_range(0, 4));
      repeat ($urandom_range(0, 1)) @(negedge clk);
    end
    check(s_writes == n_wr, $sformatf("%0d stores for %0d WRITEs", s_writes, n_wr));
    check(n_rd > 0 && n_wait > 0, "reads with and without wait states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
