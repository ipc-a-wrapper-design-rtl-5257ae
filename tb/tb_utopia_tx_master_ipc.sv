// tb_utopia_tx_master_ipc: self-checking test of the UTOPIA transmit master.
//
// A core model holds one cell at a time in a 53-byte FIFO and requests
// Transmit; a PHY model takes the bytes into a small buffer it drains slowly,
// lowers TxFulln when at most four places are left (and keeps it low until
// the master has stopped), and lowers TxClav at random between cells.
// Checked: every byte of every cell arrives in order with SOC on the first
// byte only, the PHY buffer never overflows, no more than four bytes follow
// a low TxFulln, a cell with no back-pressure takes exactly 53 cycles, and
// the hold (back-pressure) and TxClav waits both happened.
module tb_utopia_tx_master_ipc;
  import ipc_pkg::*;

  localparam int CELLS = 40;
  localparam int CAP   = 8;      // PHY buffer size

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           TxSOC, TxEnbn, TxClk, TxFulln, TxClav, trend, data_request;
  logic [7:0]     TxData, data;
  utopia_trcode_e trcode;

  utopia_tx_master_ipc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- core model: one cell of 53 bytes, byte k of cell c = c*7 + k*3 + 1
  function automatic logic [7:0] cell_byte(int c, int k);
    return 8'(c * 7 + k * 3 + 1);
  endfunction
  int  cell_tx = 0;   // cell being sent
  int  rd = 0;        // FIFO read pointer
  bit  pending = 0;
  assign data   = cell_byte(cell_tx, rd);
  assign trcode = pending ? UT_TRANSMIT : UT_NONE;

  // ---- PHY model
  int  occ = 0, rx_cell = 0, rx_k = 0, after_full = 0;
  bit  backpressure = 1'b1;          // the PHY drains slowly
  bit  full_n_q = 1'b1, clav_q = 1'b1;
  int  holds = 0, clav_waits = 0, sent = 0;
  assign TxFulln = full_n_q;
  bit  clav_force = 1'b0;
  assign TxClav  = clav_q || clav_force;

  always @(posedge clk) if (rst_n) begin
    int occ_n;
    occ_n = occ;
    if (!TxEnbn) begin
      check(TxData == cell_byte(rx_cell, rx_k), $sformatf("cell %0d byte %0d", rx_cell, rx_k));
      check(TxSOC == (rx_k == 0), "SOC on the first byte only");
      if (!full_n_q) after_full++;
      check(after_full <= 4, "at most four bytes after TxFulln low");
      occ_n++;
      if (rx_k == 52) begin rx_k = 0; rx_cell++; end
      else rx_k++;
    end
    if (occ_n > 0 && (!backpressure || $urandom_range(0, 2) == 0)) occ_n--;
    check(occ_n <= CAP, "PHY buffer overflow");
    if (occ_n >= CAP - 4) full_n_q <= 1'b0;
    else if (TxEnbn) begin
      if (!full_n_q) holds++;
      full_n_q  <= 1'b1;
      after_full = 0;
    end
    occ = occ_n;
    // TxClav: drop for a while after some cells
    if (trcode == UT_TRANSMIT && TxEnbn && !clav_q) clav_waits++;
    clav_q <= (rx_k != 0) || ($urandom_range(0, 3) != 0);
  end

  // core: pop on data_request, next cell after trend
  always @(posedge clk) if (rst_n) begin
    if (data_request) begin
      if (trend) begin
        check(rd == 52, "trend on byte 53");
        rd      <= 0;
        pending <= 0;
        sent    <= sent + 1;
      end else rd <= rd + 1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(TxEnbn && !TxSOC && TxClk == clk, "idle after reset");
    for (int c = 0; c < CELLS; c++) begin
      cell_tx = c;
      backpressure = (c != 5);
      pending = 1;
      while (pending) @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    // timed cell, PHY empty and fast: 53 cycles from first byte to trend
    backpressure = 0;
    repeat (20) @(negedge clk);
    clav_force = 1'b1;
    cell_tx = CELLS;
    pending = 1;
    begin
      automatic int n = 0;
      while (TxEnbn) @(negedge clk);
      while (pending) begin
        @(negedge clk);
        n++;
      end
      check(n == 53, $sformatf("unthrottled cell took %0d cycles", n));
    end
    clav_force = 1'b0;
    repeat (3) @(negedge clk);
    check(rx_cell == CELLS + 1 && sent == CELLS + 1, "all cells received");
    check(holds > 0, $sformatf("TxFulln hold happened %0d times", holds));
    check(clav_waits > 0, $sformatf("TxClav wait happened %0d times", clav_waits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
