// tb_ppci_des_wrapper: end-to-end test of the PPCI-to-DES wrapper.
//
// A PPCI master (tasks below) writes key and plaintext, reads the ciphertext,
// then writes the ciphertext to the C addresses and reads the plaintext back
// from the T addresses.  The DES IP is the behavioural stand-in model; the
// expected values come from the reference transform.  Also checked: two
// cycles per PPCI write, and the exact length of a read that is issued
// right after the last argument word: ACK comes DES latency + 2 cycles after
// the first VAL cycle, so DES latency + 1 wait states.
module tb_ppci_des_wrapper;
  import ipc_pkg::*;
  import tb_cipher_pkg::*;

  localparam int unsigned LAT = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        VAL = 1'b0, RNW = 1'b0, EOP = 1'b0, ACK;
  logic [7:0]  ADDRESS = '0;
  logic [31:0] WData = '0, RData;
  logic        start, enc_dec, done, busy;
  logic [63:0] pkey, ptext, ctext;

  ppci_des_wrapper dut (.*);
  des_ip_model #(.LATENCY(LAT)) u_ip (.*);

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

  task automatic ppci_write(input logic [7:0] a, input logic [31:0] d);
    logic [31:0] q;
    int c;
    ppci(1'b0, a, d, q, c);
    check(c == 1, $sformatf("write acknowledged after %0d cycle(s)", c));
  endtask

  task automatic ppci_read(input logic [7:0] a, output logic [31:0] q, output int c);
    ppci(1'b1, a, '0, q, c);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r0, r1;
    int c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 12; t++) begin
      automatic logic [63:0] key = {$urandom, $urandom};
      automatic logic [63:0] pt  = {$urandom, $urandom};
      automatic logic [63:0] ct  = toy_encrypt(key, pt);
      // ENCR: K0 K1 T0 T1 then read C0 C1
      ppci_write(K0ADDR, key[63:32]);
      ppci_write(K1ADDR, key[31:0]);
      ppci_write(T0ADDR, pt[63:32]);
      ppci_write(T1ADDR, pt[31:0]);
      ppci_read(C0ADDR, r0, c);
      check(c == LAT + 2, $sformatf("encrypt read acknowledged after %0d cycles, expected %0d", c, LAT + 2));
      ppci_read(C1ADDR, r1, c);
      check(c == 1, "second result word without wait");
      check({r0, r1} == ct, "ciphertext read over PPCI");
      check(u_ip.starts == 2 * t + 1, "one DES start per ENCR");
      // DECR: K0 K1 C0 C1 then read T0 T1, with idle cycles in between
      ppci_write(K1ADDR, key[31:0]);
      repeat (t % 3) @(negedge clk);
      ppci_write(C0ADDR, ct[63:32]);
      ppci_write(K0ADDR, key[63:32]);
      ppci_write(C1ADDR, ct[31:0]);
      repeat (LAT + 4) @(negedge clk);
      ppci_read(T0ADDR, r0, c);
      check(c == 1, "result already there: no wait");
      ppci_read(T1ADDR, r1, c);
      check({r0, r1} == pt, "plaintext recovered over PPCI");
      check(u_ip.starts == 2 * t + 2, "one DES start per DECR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
