// ppci_master_ipc: master interface protocol component for PPCI, the
// simplified peripheral VCI bus.
//
// The core asks for a READ or a WRITE by putting its code on trcode, with
// the address on addr_p (shared by READ.ADDR and WRITE.ADDR) and, for a
// write, the word on write_data.  The IPC raises VAL with RNW, ADDRESS,
// WData and EOP, holds them until it samples ACK high at a rising edge, and
// then ends the transaction: trend, addr_p_request and write_data_request
// (WRITE) or read_data_load with read_data = RData (READ) are all high in
// that cycle, the cycle in which the argument is taken from or given to the
// core.  The core must hold its code until trend, and its arguments through
// the trend cycle; it may drop the code in the trend cycle.
//
// Timing: VAL rises in the cycle after trcode is seen; with a slave that
// answers in one cycle a transfer takes three cycles (idle, request,
// acknowledge).  Each transaction is one single-word packet, so EOP is high
// with every request.  Address, write data and read data are wired through
// (the "netlist" construct); only the state and the transaction code are
// stored.  The port set follows the PPCI protocol description, mirrored for
// the master side; EOP use, timing and encodings are this design's choices.
module ppci_master_ipc
  import ipc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // PPCI interface ports
  output logic         VAL,
  output logic         RNW,
  output logic [7:0]   ADDRESS,
  output logic         EOP,
  output logic [31:0]  WData,
  input  logic         ACK,
  input  logic [31:0]  RData,
  // core ports
  input  ppci_trcode_e trcode,
  output logic         trend,
  input  logic [7:0]   addr_p,
  output logic         addr_p_request,
  input  logic [31:0]  write_data,
  output logic         write_data_request,
  output logic [31:0]  read_data,
  output logic         read_data_load
);

  typedef enum logic {S_IDLE, S_REQ} state_e;
  state_e       state;
  ppci_trcode_e op_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= PPCI_NONE;
    end else begin
      unique case (state)
        S_IDLE: if (trcode != PPCI_NONE) begin
          op_q  <= trcode;
          state <= S_REQ;
        end
        S_REQ: if (ACK) begin
          op_q  <= PPCI_NONE;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic fin;
  assign fin = (state == S_REQ) && ACK;

  assign VAL                = (state == S_REQ);
  assign RNW                = (op_q == PPCI_READ);
  assign EOP                = (state == S_REQ);
  assign ADDRESS            = addr_p;       // netlist bypasses
  assign WData              = write_data;
  assign read_data          = RData;
  assign trend              = fin;
  assign addr_p_request     = fin;
  assign write_data_request = fin && (op_q == PPCI_WRITE);
  assign read_data_load     = fin && (op_q == PPCI_READ);

  // the core keeps its code until the transaction ends and its arguments
  // through the ending cycle
  a_core_holds_code: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_REQ) |-> (ACK || trcode == op_q))
    else $error("core withdrew a PPCI request before it ended");
  a_core_holds_args: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_REQ && !ACK) |=> ($stable(addr_p)
                                  && (op_q == PPCI_READ || $stable(write_data))))
    else $error("core changed PPCI arguments before the transaction ended");

endmodule
