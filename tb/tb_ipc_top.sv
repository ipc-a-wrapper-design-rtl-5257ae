// tb_ipc_top: end-to-end test of the whole design at its default sizes.
//
// The DES path joins four components: the PPCI master IPC (whose core is
// played by the tasks below) drives the PPCI port of the PPCI-to-DES
// wrapper, and the wrapper's DES port drives the DES slave IPC, behind which
// a core model computes the reference transform after a random delay.  A
// series of blocks is encrypted, then decrypted, and compared with the
// reference.  At the same time the UTOPIA
// transmit master and slave IPCs are joined pin to pin: a sender core model
// feeds cells into the master, and a receiver core model behind the slave
// buffers the bytes, drains them slowly and reports full and cell-available
// status, so the PHY-side flow control acts on the master.  Every byte is
// checked at the receiver.
//
// Mechanisms counted (each must happen at least once): PPCI writes, PPCI
// reads held in wait states, ENCR and DECR transactions, UTOPIA cells,
// TxFulln holds and TxClav waits, and shared-port transactions of the
// single-port DES master IPC, which runs alongside against its own DES IP
// model with a core that multiplexes four argument registers onto one port.
// The PPCI-to-SRAM wrapper runs alongside too, driven by a PPCI bus task and
// backed by an SRAM model; its reads are compared with a reference copy and
// counted as SRAM writes, SRAM reads and read wait states (the direct
// connection holding ACK until the SRAM word is there).  Finally the
// Wishbone master and slave IPCs are joined pin to pin, with a register-file
// core behind the slave that delays some reads; transfers are counted as
// Wishbone writes, reads and reads held in wait states.  The UTOPIA receive
// master and slave IPCs are joined the same way: a PHY core model releases
// cells at random times, an ATM core model drains a small FIFO slowly;
// received cells, data_full pauses and RxClav waits are counted.
module tb_ipc_top;
  import ipc_pkg::*;
  import tb_cipher_pkg::*;

  localparam int          CELLS = 30;
  localparam int          CAP   = 10;   // receiver buffer (bytes)

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // PPCI / DES
  logic        ppci_val, ppci_rnw, ppci_eop, ppci_ack;
  logic [7:0]  ppci_address;
  logic [31:0] ppci_wdata, ppci_rdata;
  logic        des_start, des_enc_dec, des_done, des_busy;
  logic [63:0] des_pkey, des_ptext, des_ctext;
  // UTOPIA
  logic           utm_TxSOC, utm_TxEnbn, utm_TxClk, utm_TxFulln, utm_TxClav;
  logic [7:0]     utm_TxData, utm_data;
  utopia_trcode_e utm_trcode;
  logic           utm_trend, utm_data_request;
  logic           uts_TxClk, uts_TxSOC, uts_TxEnbn, uts_TxFulln, uts_TxClav;
  logic [7:0]     uts_TxData, uts_data;
  utopia_trcode_e uts_trcode;
  logic           uts_trend, uts_data_load, uts_data_full, uts_cell_avail;

  // PPCI master IPC and DES slave IPC
  logic           pm_VAL, pm_RNW, pm_EOP, pm_ACK;
  logic [7:0]     pm_ADDRESS;
  logic [31:0]    pm_WData, pm_RData;
  ppci_trcode_e   pm_trcode = PPCI_NONE;
  logic           pm_trend, pm_addr_p_request, pm_write_data_request, pm_read_data_load;
  logic [7:0]     pm_addr_p = '0;
  logic [31:0]    pm_write_data = '0, pm_read_data;
  logic           ds_start, ds_enc_dec, ds_done, ds_busy;
  logic [63:0]    ds_pkey, ds_ptext, ds_ctext;
  des_trcode_e    ds_trcode;
  logic           ds_trend, ds_key_p_load, ds_data_p_load, ds_result_p_request;
  logic [63:0]    ds_key_p, ds_data_p;
  logic [63:0]    ds_result_p = '0;
  logic           ds_result_p_valid = 1'b0;

  // DES master IPC with one shared argument port
  logic           d1_start, d1_enc_dec, d1_done, d1_busy;
  logic [63:0]    d1_pkey, d1_ptext, d1_ctext, d1_odata_p, d1_idata_p;
  des_trcode_e    d1_trcode = DES_NONE;
  logic           d1_trend, d1_idata_p_load;
  logic [1:0]     d1_odata_p_request;

  // PPCI-to-SRAM wrapper
  logic           ps_VAL = 1'b0, ps_RNW = 1'b0, ps_EOP = 1'b0, ps_ACK;
  logic [7:0]     ps_ADDRESS = '0;
  logic [31:0]    ps_WData = '0, ps_RData;
  logic           sr_CSn, sr_WEn;
  logic [7:0]     sr_A;
  logic [31:0]    sr_D, sr_Q;

  // Wishbone master and slave IPCs
  logic           wbm_CYC_O, wbm_STB_O, wbm_WE_O, wbm_ACK_I;
  logic [31:0]    wbm_ADR_O, wbm_DAT_O, wbm_DAT_I;
  wb_trcode_e     wbm_trcode = WB_NONE;
  logic           wbm_trend, wbm_addr_p_request, wbm_write_data_request, wbm_read_data_load;
  logic [31:0]    wbm_addr_p = '0, wbm_write_data = '0, wbm_read_data;
  logic           wbs_CYC_I, wbs_STB_I, wbs_WE_I, wbs_ACK_O;
  logic [31:0]    wbs_ADR_I, wbs_DAT_I, wbs_DAT_O;
  wb_trcode_e     wbs_trcode;
  logic           wbs_trend, wbs_addr_p_load, wbs_write_data_load, wbs_read_data_request;
  logic [31:0]    wbs_addr_p, wbs_write_data, wbs_read_data;
  logic           wbs_read_data_valid = 1'b1;

  // UTOPIA receive master and slave IPCs
  logic              urm_RxEnbn, urm_RxClk, urm_RxSOC, urm_RxClav;
  logic [7:0]        urm_RxData, urm_data;
  utopia_rx_trcode_e urm_trcode;
  logic              urm_trend, urm_data_load, urm_data_full;
  logic              urs_RxClk, urs_RxEnbn, urs_RxSOC, urs_RxClav;
  logic [7:0]        urs_RxData, urs_data;
  utopia_rx_trcode_e urs_trcode;
  logic              urs_trend, urs_data_request, urs_cell_avail;

  ipc_top dut (.*);

  sram_model #(.AW(8), .DW(32)) u_mem (
    .clk, .CSn (sr_CSn), .WEn (sr_WEn), .A (sr_A), .D (sr_D), .Q (sr_Q));

  des_ip_model #(.LATENCY(8)) u_ip1 (
    .clk, .rst_n, .start (d1_start), .enc_dec (d1_enc_dec), .pkey (d1_pkey),
    .ptext (d1_ptext), .done (d1_done), .busy (d1_busy), .ctext (d1_ctext));

  // PPCI master IPC -> wrapper PPCI port
  assign ppci_val     = pm_VAL;
  assign ppci_rnw     = pm_RNW;
  assign ppci_address = pm_ADDRESS;
  assign ppci_eop     = pm_EOP;
  assign ppci_wdata   = pm_WData;
  assign pm_ACK       = ppci_ack;
  assign pm_RData     = ppci_rdata;
  // wrapper DES port -> DES slave IPC
  assign ds_start     = des_start;
  assign ds_enc_dec   = des_enc_dec;
  assign ds_pkey      = des_pkey;
  assign ds_ptext     = des_ptext;
  assign des_done     = ds_done;
  assign des_busy     = ds_busy;
  assign des_ctext    = ds_ctext;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int n_write = 0, n_read_wait = 0, n_encr = 0, n_decr = 0;
  int n_cells = 0, n_holds = 0, n_clav_waits = 0, n_shared = 0;
  int n_sram_wr = 0, n_sram_rd = 0, n_sram_wait = 0;
  int n_wb_wr = 0, n_wb_rd = 0, n_wb_wait = 0;
  int n_rx_cells = 0, n_rx_pause = 0, n_rx_clav_wait = 0;

  // DES core behind the slave IPC: result after 1..20 cycles
  int  core_cnt = 0;
  bit  core_run = 0;
  always @(posedge clk) if (rst_n) begin
    if (ds_key_p_load && ds_data_p_load) begin
      check(ds_trcode == DES_ENCR || ds_trcode == DES_DECR, "DES transaction recognised");
      ds_result_p <= (ds_trcode == DES_ENCR) ? toy_encrypt(ds_key_p, ds_data_p)
                                             : toy_decrypt(ds_key_p, ds_data_p);
      core_cnt    <= $urandom_range(1, 20);
      core_run    <= 1;
    end else if (core_run) begin
      if (core_cnt == 1) begin
        ds_result_p_valid <= 1'b1;
        core_run          <= 0;
      end
      core_cnt <= core_cnt - 1;
    end else if (ds_result_p_request) ds_result_p_valid <= 1'b0;
  end

  // UTOPIA pins: master to slave
  assign uts_TxClk   = utm_TxClk;
  assign uts_TxSOC   = utm_TxSOC;
  assign uts_TxEnbn  = utm_TxEnbn;
  assign uts_TxData  = utm_TxData;
  assign utm_TxFulln = uts_TxFulln;
  assign utm_TxClav  = uts_TxClav;

  // ---------------- core of the PPCI master IPC
  task automatic ppci(input bit rnw, input logic [7:0] a, input logic [31:0] d,
                      output logic [31:0] q);
    int cycles = 0;
    pm_trcode = rnw ? PPCI_READ : PPCI_WRITE; pm_addr_p = a; pm_write_data = d;
    forever begin
      @(negedge clk);
      cycles++;
      if (pm_trend || cycles > 1000) break;
    end
    check(pm_addr_p_request && (pm_read_data_load == rnw) && (pm_write_data_request == !rnw),
          "PPCI master strobes at the end");
    q = pm_read_data;
    pm_trcode = PPCI_NONE;
    if (!rnw) n_write++;
    if (rnw && cycles > 2) n_read_wait++;
    @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n && des_start) begin
    if (des_enc_dec) n_encr++;
    else             n_decr++;
  end

  // ---------------- UTOPIA sender core: one 53-byte cell at a time
  function automatic logic [7:0] cell_byte(int c, int k);
    return 8'(c * 13 + k * 7 + 5);
  endfunction
  int cell_tx = 0, rd = 0;
  bit pending = 0;
  assign utm_data   = cell_byte(cell_tx, rd);
  assign utm_trcode = pending ? UT_TRANSMIT : UT_NONE;
  always @(posedge clk) if (rst_n && utm_data_request) begin
    if (utm_trend) begin
      rd <= 0;
      pending <= 0;
    end else rd <= rd + 1;
  end

  // ---------------- UTOPIA receiver core behind the slave IPC
  int occ = 0, rx_cell = 0, rx_k = 0, after_full = 0;
  bit full_q = 1'b0, avail_q = 1'b1;
  assign uts_data_full  = full_q;
  assign uts_cell_avail = avail_q;
  always @(posedge uts_TxClk) if (rst_n) begin
    int occ_n;
    occ_n = occ;
    if (uts_data_load) begin
      check(uts_data == cell_byte(rx_cell, rx_k), $sformatf("cell %0d byte %0d", rx_cell, rx_k));
      check(uts_trcode == UT_TRANSMIT, "slave reports Transmit");
      if (full_q) after_full++;
      check(after_full <= 4, "at most four bytes after full");
      occ_n++;
      if (rx_k == 52) begin
        check(uts_trend, "slave trend on byte 53");
        rx_k = 0; rx_cell++; n_cells++;
      end else rx_k++;
    end
    if (occ_n > 0 && $urandom_range(0, 1) == 0) occ_n--;
    check(occ_n <= CAP, "receiver buffer overflow");
    if (occ_n >= CAP - 4) full_q <= 1'b1;
    else if (!uts_data_load) begin
      if (full_q) n_holds++;
      full_q <= 1'b0;
      after_full = 0;
    end
    occ = occ_n;
    if (pending && utm_TxEnbn && !avail_q) n_clav_waits++;
    avail_q <= (rx_k != 0) || ($urandom_range(0, 2) != 0);
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // single-port DES IPC: core with four argument registers
  logic [63:0] a_key [2], a_txt [2];     // index 0: ENCR, 1: DECR
  bit          d1_dec = 0;
  assign d1_odata_p = (d1_odata_p_request == 2'b01) ? a_key[d1_dec] :
                      (d1_odata_p_request == 2'b10) ? a_txt[d1_dec] : '0;
  bit d1_finished = 0;
  initial begin
    @(posedge rst_n);
    for (int t = 0; t < 8; t++) begin
      logic [63:0] expect_res;
      @(negedge clk);
      d1_dec = t[0];
      a_key[0] = {$urandom, $urandom}; a_txt[0] = {$urandom, $urandom};
      a_key[1] = {$urandom, $urandom}; a_txt[1] = {$urandom, $urandom};
      expect_res = d1_dec ? toy_decrypt(a_key[1], a_txt[1]) : toy_encrypt(a_key[0], a_txt[0]);
      d1_trcode = d1_dec ? DES_DECR : DES_ENCR;
      while (!d1_start) @(negedge clk);
      d1_trcode = DES_NONE;
      while (!d1_trend) @(negedge clk);
      check(d1_idata_p_load && d1_idata_p == expect_res, "single-port DES transaction result");
      n_shared++;
    end
    d1_finished = 1;
  end

  // PPCI-to-SRAM wrapper: bus task, raise at a falling edge, hold until ACK
  task automatic ps_bus(input bit rnw, input logic [7:0] a, input logic [31:0] d,
                        output logic [31:0] q);
    int cycles = 0;
    ps_VAL = 1'b1; ps_RNW = rnw; ps_ADDRESS = a; ps_WData = d; ps_EOP = 1'b1;
    do begin
      @(negedge clk);
      cycles++;
    end while (!ps_ACK && cycles < 1000);
    q = ps_RData;
    if (rnw && cycles > 1) n_sram_wait++;
    @(negedge clk);
    ps_VAL = 1'b0; ps_EOP = 1'b0;
  endtask

  bit sram_finished = 0;
  int unsigned mem_w0 = 0, mem_r0 = 0;  // accesses counted from here on
  initial begin
    logic [31:0] ref_mem [256];
    logic [31:0] q;
    foreach (ref_mem[k]) ref_mem[k] = '0;
    @(posedge rst_n);
    @(negedge clk);
    mem_w0 = u_mem.writes;
    mem_r0 = u_mem.reads;
    for (int k = 0; k < 200; k++) begin
      automatic logic [7:0] a = 8'($urandom_range(0, 15));
      if (k < 16 || $urandom_range(0, 1) != 0) begin
        automatic logic [31:0] d = $urandom;
        ps_bus(1'b0, a, d, q);
        ref_mem[a] = d;
        n_sram_wr++;
      end else begin
        ps_bus(1'b1, a, '0, q);
        check(q == ref_mem[a], "SRAM word read through the wrapper");
        n_sram_rd++;
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    sram_finished = 1;
  end

  // Wishbone: master pins to slave pins
  assign wbs_CYC_I = wbm_CYC_O;
  assign wbs_STB_I = wbm_STB_O;
  assign wbs_WE_I  = wbm_WE_O;
  assign wbs_ADR_I = wbm_ADR_O;
  assign wbs_DAT_I = wbm_DAT_O;
  assign wbm_ACK_I = wbs_ACK_O;
  assign wbm_DAT_I = wbs_DAT_O;

  // Wishbone slave core: register file, some reads held for 1..3 cycles
  logic [31:0] wb_regs [64];
  int          wb_hold = 0;
  initial foreach (wb_regs[k]) wb_regs[k] = '0;
  assign wbs_read_data = wb_regs[wbs_addr_p[7:2]];
  always @(posedge clk) if (rst_n) begin
    if (wbs_write_data_load) wb_regs[wbs_addr_p[7:2]] <= wbs_write_data;
    if (wbs_read_data_request) wbs_read_data_valid <= ($urandom_range(0, 1) == 0);
    else if (!wbs_read_data_valid && wbs_addr_p_load) begin
      if (wb_hold >= 2) begin
        wbs_read_data_valid <= 1'b1;
        wb_hold <= 0;
      end else wb_hold <= wb_hold + 1;
    end
  end

  // Wishbone master core
  bit wb_finished = 0;
  initial begin
    logic [31:0] ref_wb [64];
    foreach (ref_wb[k]) ref_wb[k] = '0;
    @(posedge rst_n);
    for (int k = 0; k < 150; k++) begin
      automatic bit          wr = (k < 20) || ($urandom_range(0, 1) != 0);
      automatic logic [31:0] a  = {24'($urandom), 6'($urandom_range(0, 15)), 2'b00};
      automatic logic [31:0] d  = $urandom;
      automatic int          cycles = 0;
      @(negedge clk);
      wbm_trcode = wr ? WB_WRITE : WB_READ;
      wbm_addr_p = a;
      wbm_write_data = d;
      do begin
        @(negedge clk);
        cycles++;
      end while (!wbm_trend && cycles < 1000);
      if (wr) begin
        ref_wb[a[7:2]] = d;
        n_wb_wr++;
      end else begin
        check(wbm_read_data_load && wbm_read_data == ref_wb[a[7:2]], "Wishbone word read back");
        n_wb_rd++;
        if (cycles > 2) n_wb_wait++;
      end
      wbm_trcode = WB_NONE;
    end
    wb_finished = 1;
  end

  // UTOPIA receive: master pins to slave pins
  assign urs_RxClk  = urm_RxClk;
  assign urs_RxEnbn = urm_RxEnbn;
  assign urm_RxData = urs_RxData;
  assign urm_RxSOC  = urs_RxSOC;
  assign urm_RxClav = urs_RxClav;

  localparam int RX_CELLS = 20;
  localparam int RX_CAP   = 6;
  function automatic logic [7:0] rx_byte(int c, int k);
    return 8'(c * 31 + k * 5 + 3);
  endfunction
  // PHY core: rx_ready cells have arrived; the FIFO head is rx_tc/rx_tk
  int rx_ready = 0, rx_tc = 0, rx_tk = 0;
  assign urs_data       = rx_byte(rx_tc, rx_tk);
  assign urs_cell_avail = rx_ready > rx_tc + ((rx_tk != 0) ? 1 : 0);
  always @(posedge urs_RxClk) if (rst_n && urs_data_request) begin
    if (rx_tk == 52) begin
      rx_tk <= 0;
      rx_tc <= rx_tc + 1;
    end else rx_tk <= rx_tk + 1;
  end
  // ATM core: FIFO of RX_CAP bytes drained at random
  int rx_occ = 0, rx_c = 0, rx_k2 = 0;
  assign urm_trcode    = (rx_c < RX_CELLS) ? UR_RECEIVE : UR_NONE;
  assign urm_data_full = rx_occ >= RX_CAP - 2;
  always @(posedge clk) if (rst_n) begin
    automatic int occ_n = rx_occ;
    if (urm_data_load) begin
      check(urm_data == rx_byte(rx_c, rx_k2), "UTOPIA receive byte");
      occ_n++;
      if (rx_k2 == 52) begin
        check(urm_trend, "receive trend on byte 53");
        rx_k2      <= 0;
        rx_c       <= rx_c + 1;
        n_rx_cells <= n_rx_cells + 1;
      end else rx_k2 <= rx_k2 + 1;
    end
    if (occ_n > 0 && $urandom_range(0, 2) == 0) occ_n--;
    check(occ_n <= RX_CAP, "receive FIFO overflow");
    if (urm_data_full && urm_RxEnbn && rx_k2 != 0) n_rx_pause <= n_rx_pause + 1;
    if (urm_trcode == UR_RECEIVE && !urm_RxClav && rx_k2 == 0 && urm_RxEnbn)
      n_rx_clav_wait <= n_rx_clav_wait + 1;
    rx_occ <= occ_n;
  end
  initial begin
    @(posedge rst_n);
    while (rx_ready < RX_CELLS) begin
      repeat ($urandom_range(0, 150)) @(negedge clk);
      rx_ready++;
    end
  end

  // UTOPIA stream
  bit utopia_done = 0;
  initial begin
    @(posedge rst_n);
    for (int c = 0; c < CELLS; c++) begin
      @(negedge clk);
      cell_tx = c;
      pending = 1;
      while (pending) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    utopia_done = 1;
  end

  // DES over PPCI
  initial begin
    logic [31:0] r0, r1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 10; t++) begin
      automatic logic [63:0] key = {$urandom, $urandom};
      automatic logic [63:0] pt  = {$urandom, $urandom};
      automatic logic [63:0] ct  = toy_encrypt(key, pt);
      ppci(0, K0ADDR, key[63:32], r0);
      ppci(0, K1ADDR, key[31:0], r0);
      ppci(0, T0ADDR, pt[63:32], r0);
      ppci(0, T1ADDR, pt[31:0], r0);
      ppci(1, C0ADDR, '0, r0);
      ppci(1, C1ADDR, '0, r1);
      check({r0, r1} == ct, "encryption through the wrapper");
      ppci(0, K0ADDR, key[63:32], r0);
      ppci(0, K1ADDR, key[31:0], r0);
      ppci(0, C0ADDR, ct[63:32], r0);
      ppci(0, C1ADDR, ct[31:0], r0);
      ppci(1, T0ADDR, '0, r0);
      ppci(1, T1ADDR, '0, r1);
      check({r0, r1} == pt, "decryption through the wrapper");
    end
    wait (utopia_done && d1_finished && sram_finished && wb_finished && rx_c == RX_CELLS);
    check(rx_cell == CELLS && rx_k == 0, "all UTOPIA cells delivered");
    check(n_encr == 10 && n_decr == 10, "one DES transaction per block and direction");
    $display("mechanisms: ppci_write=%0d read_wait=%0d encr=%0d decr=%0d cells=%0d fulln_hold=%0d clav_wait=%0d shared_port=%0d sram_write=%0d sram_read=%0d sram_read_wait=%0d",
             n_write, n_read_wait, n_encr, n_decr, n_cells, n_holds, n_clav_waits, n_shared,
             n_sram_wr, n_sram_rd, n_sram_wait);
    $display("mechanisms: wb_write=%0d wb_read=%0d wb_read_wait=%0d rx_cells=%0d rx_full_pause=%0d rx_clav_wait=%0d",
             n_wb_wr, n_wb_rd, n_wb_wait, n_rx_cells, n_rx_pause, n_rx_clav_wait);
    check(u_mem.writes - mem_w0 == n_sram_wr && u_mem.reads - mem_r0 == n_sram_rd, "one SRAM access per PPCI transaction");
    check(n_write > 0,      "PPCI write happened");
    check(n_read_wait > 0,  "PPCI read wait state happened");
    check(n_encr > 0,       "ENCR happened");
    check(n_decr > 0,       "DECR happened");
    check(n_cells > 0,      "UTOPIA cell transfer happened");
    check(n_holds > 0,      "TxFulln hold happened");
    check(n_clav_waits > 0, "TxClav wait happened");
    check(n_shared > 0,     "shared-port DES transaction happened");
    check(n_sram_wr > 0,    "SRAM write through the direct connection happened");
    check(n_sram_rd > 0,    "SRAM read through the direct connection happened");
    check(n_sram_wait > 0,  "SRAM read wait state happened");
    check(n_wb_wr > 0,      "Wishbone write happened");
    check(n_wb_rd > 0,      "Wishbone read happened");
    check(n_wb_wait > 0,    "Wishbone read wait state happened");
    check(n_rx_cells == RX_CELLS, "UTOPIA receive cells delivered");
    check(n_rx_pause > 0,   "UTOPIA receive data_full pause happened");
    check(n_rx_clav_wait > 0, "UTOPIA receive RxClav wait happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
