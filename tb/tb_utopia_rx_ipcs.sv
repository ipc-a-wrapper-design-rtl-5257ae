// tb_utopia_rx_ipcs: self-checking test of the UTOPIA receive master and
// slave IPCs, joined pin to pin.
//
// Behind the slave a PHY core model holds a queue of cells that arrive at
// random times and reports cell_avail while a whole cell is waiting.
// Behind the master an ATM core model keeps UR_RECEIVE on trcode, buffers
// the bytes in a small FIFO that drains at random, and raises data_full when
// at most two places are left.  Every byte is checked in order at the ATM
// core, together with trend on byte 53 and the FIFO never overflowing.  The
// first cells run without back-pressure, with every cell already waiting, and
// must take exactly 54 cycles from the first RxEnbn-low cycle to trend
// (53 enables plus one cycle of latency).  Counted and required at least
// once: cells, pauses for data_full, waits for RxClav.
module tb_utopia_rx_ipcs;
  import ipc_pkg::*;

  localparam int CELLS = 40;
  localparam int CAP   = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              RxEnbn, RxClk, RxSOC, RxClav;
  logic [7:0]        RxData;
  utopia_rx_trcode_e m_trcode, s_trcode;
  logic              m_trend, m_data_load, m_data_full;
  logic              s_trend, s_data_request, s_cell_avail;
  logic [7:0]        m_data, s_data;

  utopia_rx_master_ipc u_m (
    .clk, .rst_n, .RxEnbn, .RxClk, .RxData, .RxSOC, .RxClav,
    .trcode (m_trcode), .trend (m_trend), .data (m_data),
    .data_load (m_data_load), .data_full (m_data_full));

  utopia_rx_slave_ipc u_s (
    .RxClk, .rst_n, .RxEnbn, .RxData, .RxSOC, .RxClav,
    .trcode (s_trcode), .trend (s_trend), .data (s_data),
    .data_request (s_data_request), .cell_avail (s_cell_avail));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] cell_byte(int c, int k);
    return 8'(c * 29 + k * 3 + 1);
  endfunction

  // PHY core: cells_ready cells have arrived, tx_cell/tx_k is the FIFO head
  int cells_ready = 0, tx_cell = 0, tx_k = 0;
  bit throttle = 1'b0;
  assign s_data       = cell_byte(tx_cell, tx_k);
  assign s_cell_avail = cells_ready > tx_cell + ((tx_k != 0) ? 1 : 0);
  always @(posedge RxClk) if (rst_n && s_data_request) begin
    check(s_trcode == UR_RECEIVE, "slave reports Receive");
    check(s_trend == (tx_k == 52), "slave trend when byte 53 is asked for");
    if (tx_k == 52) begin
      tx_k    <= 0;
      tx_cell <= tx_cell + 1;
    end else tx_k <= tx_k + 1;
  end

  // ATM core: FIFO of CAP bytes, drained at random once throttled
  int  occ = 0, rx_cell = 0, rx_k = 0;
  int  n_cells = 0, n_pause = 0, n_clav_wait = 0;
  bit  want = 1'b1;
  assign m_trcode    = want ? UR_RECEIVE : UR_NONE;
  assign m_data_full = throttle && (occ >= CAP - 2);
  always @(posedge clk) if (rst_n) begin
    automatic int occ_n = occ;
    if (m_data_load) begin
      check(m_data == cell_byte(rx_cell, rx_k), $sformatf("cell %0d byte %0d", rx_cell, rx_k));
      check(m_trend == (rx_k == 52), "master trend on byte 53");
      occ_n++;
      if (rx_k == 52) begin
        rx_k    <= 0;
        rx_cell <= rx_cell + 1;
        n_cells <= n_cells + 1;
      end else rx_k <= rx_k + 1;
    end
    if (!throttle) occ_n = 0;
    else if (occ_n > 0 && $urandom_range(0, 2) == 0) occ_n--;
    check(occ_n <= CAP, "ATM FIFO overflow");
    if (m_data_full && RxEnbn && u_m.state == u_m.S_RECV) n_pause <= n_pause + 1;
    if (want && !RxClav && u_m.state == u_m.S_IDLE) n_clav_wait <= n_clav_wait + 1;
    occ <= occ_n;
  end

  // cycles from the first enable of a cell to its trend
  int t_cell = 0, cell_len = 0;
  always @(negedge clk) if (rst_n) begin
    if (!RxEnbn && u_s.cnt == 6'd0) t_cell = 1;
    else if (t_cell != 0) t_cell++;
    if (m_trend) begin
      cell_len = t_cell;
      t_cell = 0;
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
    // phase 1: four cells waiting, no back-pressure
    cells_ready = 4;
    for (int c = 0; c < 4; c++) begin
      @(negedge clk);
      while (!m_trend) @(negedge clk);
      #1;
      check(cell_len == 54, $sformatf("unpaused cell took %0d cycles, expected 54", cell_len));
    end
    // phase 2: cells arrive late and the ATM FIFO drains slowly
    throttle = 1'b1;
    while (cells_ready < CELLS) begin
      repeat ($urandom_range(0, 120)) @(negedge clk);
      cells_ready++;
      if ($urandom_range(0, 3) == 0) begin
        want = 1'b0;
        repeat ($urandom_range(1, 30)) @(negedge clk);
        want = 1'b1;
      end
    end
    while (rx_cell < CELLS) @(negedge clk);
    repeat (5) @(negedge clk);
    check(RxEnbn, "bus idle at the end");
    check(tx_cell == CELLS && tx_k == 0, "every cell sent once");
    check(n_cells == CELLS, "every cell received");
    check(n_pause > 0, $sformatf("pauses for data_full (%0d)", n_pause));
    check(n_clav_wait > 0, $sformatf("waits for RxClav (%0d)", n_clav_wait));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
