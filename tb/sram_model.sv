// sram_model: behavioural model of a synchronous single-port SRAM, for the
// testbenches only.
//
// At a rising edge with CSn low the SRAM either stores D at A (WEn low) or
// reads A into its output register Q (WEn high); Q is therefore valid in the
// cycle after the read access and keeps its value until the next read.  The
// array starts at zero.  It counts accesses so that testbenches can check
// that each bus transaction caused exactly one SRAM access.
module sram_model #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          CSn,
  input  logic          WEn,
  input  logic [AW-1:0] A,
  input  logic [DW-1:0] D,
  output logic [DW-1:0] Q
);
  logic [DW-1:0] mem [2**AW];
  int unsigned writes = 0, reads = 0;

  initial begin
    foreach (mem[k]) mem[k] = '0;
    Q = '0;
  end

  always @(posedge clk) begin
    if (!CSn) begin
      if (!WEn) begin
        mem[A] <= D;
        writes <= writes + 1;
      end else begin
        Q     <= mem[A];
        reads <= reads + 1;
      end
    end
  end
endmodule
