// ppci_des_wrapper: PPCI-compatible wrapper for a DES IP, built from two
// interface protocol components and a controller.
//
// A bus master on PPCI writes a 64-bit key and a 64-bit text as four 32-bit
// words; the wrapper then runs one DES encryption or decryption on the DES IP
// and the master reads the 64-bit result back as two words.  The structure is
// the general one for joining two protocols P1 and P2: a slave P1 IPC
// (ppci_slave_ipc) recognises bus transactions, a controller with buffers
// (des_wrapper_core) stores the arguments and pairs the transactions, and a
// master P2 IPC (des_master_ipc) executes DES transactions.  Only the
// controller is specific to this wrapper.
//
// Interface: the PPCI slave port (VAL/RNW/ADDRESS/EOP/WData in, ACK/RData
// out) and the DES master port (start/enc_dec/pkey/ptext out,
// done/busy/ctext in), one clock, active-low asynchronous reset.  Register
// addresses are in ipc_pkg.  See the submodules for cycle timing.
module ppci_des_wrapper
  import ipc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // PPCI slave port
  input  logic        VAL,
  input  logic        RNW,
  input  logic [7:0]  ADDRESS,
  input  logic        EOP,
  input  logic [31:0] WData,
  output logic        ACK,
  output logic [31:0] RData,
  // DES master port
  output logic        start,
  output logic        enc_dec,
  output logic [63:0] pkey,
  output logic [63:0] ptext,
  input  logic        done,
  input  logic        busy,
  input  logic [63:0] ctext
);

  ppci_trcode_e pvci_trcode;
  logic         pvci_trend;
  logic [7:0]   addr_p;
  logic         addr_p_load;
  logic [31:0]  write_data, read_data;
  logic         write_data_load, read_data_request, read_data_valid;
  des_trcode_e  des_trcode;
  logic         des_trend;
  logic [63:0]  key_p, odata_p, idata_p;
  logic         key_p_request, odata_p_request, idata_p_load;

  ppci_slave_ipc u_ppci (
    .clk, .rst_n,
    .VAL, .RNW, .ADDRESS, .EOP, .WData, .ACK, .RData,
    .trcode            (pvci_trcode),
    .trend             (pvci_trend),
    .addr_p, .addr_p_load,
    .write_data, .write_data_load,
    .read_data, .read_data_request, .read_data_valid
  );

  des_wrapper_core u_core (
    .clk, .rst_n,
    .pvci_trcode, .pvci_trend,
    .addr_p, .addr_p_load,
    .write_data, .write_data_load,
    .read_data, .read_data_request, .read_data_valid,
    .des_trcode, .des_trend,
    .key_p, .key_p_request,
    .odata_p, .odata_p_request,
    .idata_p, .idata_p_load
  );

  des_master_ipc u_des (
    .clk, .rst_n,
    .start, .enc_dec, .pkey, .ptext, .done, .busy, .ctext,
    .trcode (des_trcode),
    .trend  (des_trend),
    .key_p, .key_p_request,
    .odata_p, .odata_p_request,
    .idata_p, .idata_p_load
  );

endmodule
