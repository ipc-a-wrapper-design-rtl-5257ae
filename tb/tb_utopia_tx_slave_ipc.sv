// tb_utopia_tx_slave_ipc: self-checking test of the UTOPIA transmit slave.
//
// The testbench drives the ATM-layer side of the bus with cells of 53 bytes,
// pausing at random (TxEnbn high) inside and between cells, and records
// what the IPC hands to the core.  Checked: every byte is loaded once and in
// order, trcode covers the cell, trend marks byte 53, nothing is loaded while
// TxEnbn is high, and TxFulln/TxClav follow the core status.
module tb_utopia_tx_slave_ipc;
  import ipc_pkg::*;

  logic TxClk = 1'b0, rst_n = 1'b0;
  always #5 TxClk = ~TxClk;

  logic           TxSOC = 1'b0, TxEnbn = 1'b1, TxFulln, TxClav;
  logic [7:0]     TxData = '0, data;
  utopia_trcode_e trcode;
  logic           trend, data_load;
  logic           data_full = 1'b0, cell_avail = 1'b1;

  utopia_tx_slave_ipc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] cell_byte(int c, int k);
    return 8'(c * 5 + k * 11 + 3);
  endfunction

  // core side: collect what is loaded
  int got_cell = 0, got_k = 0, ends = 0;
  always @(posedge TxClk) if (rst_n) begin
    if (data_load) begin
      check(data == cell_byte(got_cell, got_k), $sformatf("cell %0d byte %0d", got_cell, got_k));
      check(trcode == UT_TRANSMIT, "trcode during a cell");
      check(trend == (got_k == 52), "trend on byte 53 only");
      if (got_k == 52) begin got_k = 0; got_cell++; ends++; end
      else got_k++;
    end else begin
      check(!trend, "no trend without a byte");
    end
  end

  initial begin
    repeat (100000) @(posedge TxClk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge TxClk);
    rst_n = 1'b1;
    @(negedge TxClk);
    check(trcode == UT_NONE && !data_load, "idle after reset");
    for (int c = 0; c < 20; c++) begin
      for (int k = 0; k < 53; k++) begin
        while ($urandom_range(0, 4) == 0) begin
          TxEnbn = 1'b1; TxSOC = 1'b0; TxData = 8'($urandom);
          @(negedge TxClk);
          check(!data_load, "no load while TxEnbn is high");
        end
        TxEnbn = 1'b0; TxSOC = (k == 0); TxData = cell_byte(c, k);
        // flow-control outputs follow the core status
        data_full  = $urandom_range(0, 1);
        cell_avail = $urandom_range(0, 1);
        #1;
        check(TxFulln == !data_full && TxClav == cell_avail, "flow control mirrors core status");
        @(negedge TxClk);
      end
      TxEnbn = 1'b1; TxSOC = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge TxClk);
    end
    @(negedge TxClk);
    check(got_cell == 20 && ends == 20 && got_k == 0, "all cells recognised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
