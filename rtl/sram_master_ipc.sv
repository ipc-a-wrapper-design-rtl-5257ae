// sram_master_ipc: master interface protocol component for a synchronous
// single-port SRAM.
//
// The core asks for a READ or a WRITE with a transaction code and hands over
// the arguments through core ports; the IPC produces the SRAM's chip select,
// write enable, address and data pins cycle by cycle and returns the read
// word with a load strobe.  The IPC inserts wait states on its own: it starts
// a transaction only in a cycle where the core marks the arguments it needs
// as valid (addr_p_valid, and wdata_p_valid for a WRITE).  That is what lets a
// slave IPC drive it directly, with each load strobe of the slave used as the
// matching valid input here.
//
// SRAM interface ports (all registered, active-low controls):
//   CSn, WEn   chip select and write enable; a cycle with CSn low is an access
//   A, D       address and write data, valid while CSn is low
//   Q          read data, valid in the cycle after a read access; the SRAM
//              keeps it until its next read
// Core ports:
//   trcode / trend            SR_READ or SR_WRITE, held until trend
//   addr_p, addr_p_request    address argument, taken in the request cycle
//   addr_p_valid              status: addr_p may be taken now
//   wdata_p, wdata_p_request  write-data argument, taken in the request cycle
//   wdata_p_valid             status: wdata_p may be taken now
//   rdata_p, rdata_p_load     read word and its load strobe
//
// Timing: a WRITE takes the arguments in its first cycle (IDLE), drives the
// SRAM in the second and ends there with trend.  A READ takes the address in
// its first cycle, drives the SRAM in the second and delivers Q with
// rdata_p_load and trend in the third.  A new transaction can be taken in the
// cycle after trend.
// The transaction names, the core-port naming and the valid-driven wait
// states follow the methodology; the SRAM pin set, its one-cycle read latency
// and the registered pins are this design's own choice, as the protocol of
// the SRAM is not spelled out.
module sram_master_ipc
  import ipc_pkg::*;
#(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  // SRAM interface ports
  output logic          CSn,
  output logic          WEn,
  output logic [AW-1:0] A,
  output logic [DW-1:0] D,
  input  logic [DW-1:0] Q,
  // core ports
  input  sram_trcode_e  trcode,
  output logic          trend,
  input  logic [AW-1:0] addr_p,
  output logic          addr_p_request,
  input  logic          addr_p_valid,
  input  logic [DW-1:0] wdata_p,
  output logic          wdata_p_request,
  input  logic          wdata_p_valid,
  output logic [DW-1:0] rdata_p,
  output logic          rdata_p_load
);

  typedef enum logic [1:0] {S_IDLE, S_WR, S_RD, S_RDATA} state_e;
  state_e state;

  logic take_wr, take_rd;

  assign take_wr = (state == S_IDLE) && (trcode == SR_WRITE)
                   && addr_p_valid && wdata_p_valid;
  assign take_rd = (state == S_IDLE) && (trcode == SR_READ) && addr_p_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      CSn   <= 1'b1;
      WEn   <= 1'b1;
      A     <= '0;
      D     <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (take_wr) begin
            CSn   <= 1'b0;
            WEn   <= 1'b0;
            A     <= addr_p;
            D     <= wdata_p;
            state <= S_WR;
          end else if (take_rd) begin
            CSn   <= 1'b0;
            WEn   <= 1'b1;
            A     <= addr_p;
            state <= S_RD;
          end
        end
        S_WR: begin
          CSn   <= 1'b1;
          WEn   <= 1'b1;
          state <= S_IDLE;
        end
        S_RD: begin
          CSn   <= 1'b1;
          state <= S_RDATA;
        end
        S_RDATA: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // arguments are taken in the cycle the transaction starts
  assign addr_p_request  = take_wr || take_rd;
  assign wdata_p_request = take_wr;

  // read word bypassed from the SRAM, strobed in the cycle it is valid
  assign rdata_p      = Q;
  assign rdata_p_load = (state == S_RDATA);
  assign trend        = (state == S_WR) || (state == S_RDATA);

  // the core keeps its request until the transaction ends
  a_code_held: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WR) |-> (trcode == SR_WRITE))
    else $error("WRITE code dropped before trend");
  a_code_held_rd: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {S_RD, S_RDATA}) |-> (trcode == SR_READ))
    else $error("READ code dropped before trend");

endmodule
