// des_wrapper_core: controller with buffers of the PPCI-to-DES wrapper.
//
// The PPCI side writes and reads 32-bit words; the DES side works on 64-bit
// arguments.  The core pairs the transactions of the two sides as follows:
//   WRITE K0ADDR/K1ADDR        -> key[0] / key[1]
//   WRITE T0ADDR/T1ADDR        -> text[0] / text[1], next operation is ENCR
//   WRITE C0ADDR/C1ADDR        -> text[0] / text[1], next operation is DECR
//   READ  C0ADDR/C1ADDR (ENCR) or T0ADDR/T1ADDR (DECR) -> ctext[0] / ctext[1]
// key_p = {key[0], key[1]} and odata_p = {text[0], text[1]}; the 64-bit
// result on idata_p is split into ctext[0] (upper half) and ctext[1].
//
// Each key and text register has a valid flip-flop.  When all four are valid
// and no operation is in flight, the core puts the operation on des_trcode.
// The DES IPC's key_p_request/odata_p_request strobes consume the four words
// (their valid flags clear) and mark the operation in flight; idata_p_load
// stores the result and ends it.  While an operation is armed or in flight,
// read_data_valid is low, so a PPCI READ is held in wait states until the
// result is there.  Reads of any other address return zero.  The read
// multiplexer is selected by read_data_request together with the address,
// so read_data is zero except in the cycle a READ is served.
//
// The register set, its pairing with the transactions and the data-driven
// start follow the wrapper behaviour description; the address values, which
// half of a 64-bit word is register 0, the read-wait rule and the way a mixed
// T/C write sequence picks the operation (the last text write decides) are
// this design's choices.  PVCI_TRCODE/TREND are accepted for completeness;
// the core qualifies writes with the code and does not need TREND.
module des_wrapper_core
  import ipc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // from / to the slave PPCI IPC
  input  ppci_trcode_e pvci_trcode,
  input  logic         pvci_trend,
  input  logic [7:0]   addr_p,
  input  logic         addr_p_load,
  input  logic [31:0]  write_data,
  input  logic         write_data_load,
  output logic [31:0]  read_data,
  input  logic         read_data_request,
  output logic         read_data_valid,
  // to / from the master DES IPC
  output des_trcode_e  des_trcode,
  input  logic         des_trend,
  output logic [63:0]  key_p,
  input  logic         key_p_request,
  output logic [63:0]  odata_p,
  input  logic         odata_p_request,
  input  logic [63:0]  idata_p,
  input  logic         idata_p_load
);

  logic [31:0] key   [2];
  logic [31:0] text  [2];
  logic [31:0] ctext [2];
  logic [1:0]  key_v, text_v;
  logic        decrypt_q;    // last text write went to a C address
  logic        in_flight;    // DES transaction requested, result not yet back
  logic [7:0]  raddr_q;      // address of the READ being served

  logic wr;
  assign wr = write_data_load && (pvci_trcode == PPCI_WRITE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_v     <= '0;
      text_v    <= '0;
      decrypt_q <= 1'b0;
      in_flight <= 1'b0;
      raddr_q   <= '0;
      for (int k = 0; k < 2; k++) begin
        key[k]   <= '0;
        text[k]  <= '0;
        ctext[k] <= '0;
      end
    end else begin
      // consumption by the DES IPC (a write in the same cycle wins below)
      if (key_p_request)   key_v  <= '0;
      if (odata_p_request) text_v <= '0;
      if (key_p_request || odata_p_request) in_flight <= 1'b1;
      if (idata_p_load) begin
        ctext[0]  <= idata_p[63:32];
        ctext[1]  <= idata_p[31:0];
        in_flight <= 1'b0;
      end
      if (addr_p_load) raddr_q <= addr_p;
      if (wr) begin
        unique case (addr_p)
          K0ADDR: begin key[0]  <= write_data; key_v[0]  <= 1'b1; end
          K1ADDR: begin key[1]  <= write_data; key_v[1]  <= 1'b1; end
          T0ADDR: begin text[0] <= write_data; text_v[0] <= 1'b1; decrypt_q <= 1'b0; end
          T1ADDR: begin text[1] <= write_data; text_v[1] <= 1'b1; decrypt_q <= 1'b0; end
          C0ADDR: begin text[0] <= write_data; text_v[0] <= 1'b1; decrypt_q <= 1'b1; end
          C1ADDR: begin text[1] <= write_data; text_v[1] <= 1'b1; decrypt_q <= 1'b1; end
          default: ;
        endcase
      end
    end
  end

  logic armed;
  assign armed      = (&key_v) && (&text_v) && !in_flight;
  assign des_trcode = !armed ? DES_NONE : (decrypt_q ? DES_DECR : DES_ENCR);
  assign key_p      = {key[0], key[1]};
  assign odata_p    = {text[0], text[1]};

  // read multiplexer: only the result registers are readable; the select
  // is formed from read_data_request and the latched address, so the read
  // port is zero outside the cycle in which a READ is served
  always_comb begin
    read_data = '0;
    if (read_data_request) begin
      unique case (raddr_q)
        C0ADDR, T0ADDR: read_data = ctext[0];
        C1ADDR, T1ADDR: read_data = ctext[1];
        default:        read_data = '0;
      endcase
    end
  end
  assign read_data_valid = !armed && !in_flight;

  a_result_expected: assert property (@(posedge clk) disable iff (!rst_n)
    idata_p_load |-> in_flight)
    else $error("DES result arrived with no operation in flight");
  a_trend_with_load: assert property (@(posedge clk) disable iff (!rst_n)
    des_trend |-> idata_p_load)
    else $error("DES transaction ended without a result");
  a_read_served: assert property (@(posedge clk) disable iff (!rst_n)
    read_data_request |-> (pvci_trcode == PPCI_READ && pvci_trend))
    else $error("read request outside a READ transaction");

endmodule
