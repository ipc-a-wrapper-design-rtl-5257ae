// ppci_slave_ipc: slave interface protocol component for PPCI, the
// simplified peripheral VCI bus.
//
// The IPC recognises the two PPCI transactions, READ and WRITE, and reports
// them to the core as a transaction code plus argument ports; the core never
// sees the bus handshake.  A bus master raises VAL with RNW, ADDRESS and, for
// a write, WData, and holds them until it samples ACK high at a rising edge.
//
// Core side (generated from the transaction arguments):
//   trcode / trend        transaction being recognised / its last cycle
//   addr_p, addr_p_load   shared address port of READ.ADDR and WRITE.ADDR
//   write_data(_load)     WRITE.Data, strobed in the cycle the core must store it
//   read_data(_request)   READ.Data, taken from the core in the ACK cycle
//   read_data_valid       core status: the addressed register may be read now
//
// Timing: a WRITE is stored at the first edge that sees VAL and ACK follows
// in the next cycle, so one transfer takes two cycles.  A READ waits in the
// idle state (a wait state per cycle) while read_data_valid is low; once it
// is high, ACK is raised in the next cycle together with RData.
// The port list and the address/data bypass (the "netlist" construct) follow
// the protocol description; the read-wait status input, the state encoding
// and the active-low asynchronous reset are this design's choices.  EOP is an
// interface port of the protocol that carries no meaning for single-word
// register access and is only checked for stability.
module ppci_slave_ipc
  import ipc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // PPCI interface ports
  input  logic         VAL,
  input  logic         RNW,
  input  logic [7:0]   ADDRESS,
  input  logic         EOP,
  input  logic [31:0]  WData,
  output logic         ACK,
  output logic [31:0]  RData,
  // core ports
  output ppci_trcode_e trcode,
  output logic         trend,
  output logic [7:0]   addr_p,
  output logic         addr_p_load,
  output logic [31:0]  write_data,
  output logic         write_data_load,
  input  logic [31:0]  read_data,
  output logic         read_data_request,
  input  logic         read_data_valid
);

  typedef enum logic [1:0] {S_IDLE, S_WACK, S_RACK} state_e;
  state_e state, state_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_n;
  end

  // netlist bypasses between interface ports and core ports
  assign addr_p     = ADDRESS;
  assign write_data = WData;
  assign RData      = read_data;

  always_comb begin
    state_n           = state;
    trcode            = PPCI_NONE;
    trend             = 1'b0;
    ACK               = 1'b0;
    addr_p_load       = 1'b0;
    write_data_load   = 1'b0;
    read_data_request = 1'b0;
    unique case (state)
      S_IDLE: if (VAL) begin
        addr_p_load = 1'b1;
        if (!RNW) begin
          trcode          = PPCI_WRITE;
          write_data_load = 1'b1;
          state_n         = S_WACK;
        end else begin
          trcode = PPCI_READ;
          if (read_data_valid) state_n = S_RACK;
        end
      end
      S_WACK: begin
        trcode  = PPCI_WRITE;
        ACK     = 1'b1;
        trend   = 1'b1;
        state_n = S_IDLE;
      end
      S_RACK: begin
        trcode            = PPCI_READ;
        ACK               = 1'b1;
        read_data_request = 1'b1;
        trend             = 1'b1;
        state_n           = S_IDLE;
      end
      default: state_n = S_IDLE;
    endcase
  end

  // PPCI rule: a request, once raised, stays unchanged until acknowledged.
  a_hold_request: assert property (@(posedge clk) disable iff (!rst_n)
    (VAL && !ACK) |=> (VAL && $stable(RNW) && $stable(ADDRESS) && $stable(EOP)
                       && (RNW || $stable(WData))))
    else $error("PPCI request changed before ACK");

endmodule
