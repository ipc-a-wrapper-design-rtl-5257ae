// ipc_top: the interface designs side by side.
//
// u_wrap is the PPCI-to-DES wrapper: a PPCI bus master writes key and text,
// the wrapper drives a DES IP and the result is read back over PPCI.  The
// other instances are stand-alone interface protocol components, each with
// all its ports brought out so that they can be joined outside or used on
// their own: u_pm is a PPCI master IPC (pm_*), u_ds a DES slave IPC (ds_*),
// u_d1 the DES master IPC with a single shared argument port (d1_*),
// and u_utx/u_urx the master and slave IPCs of the UTOPIA transmit interface
// (utm_*, uts_*).  u_sram is the PPCI-to-SRAM wrapper, a PPCI slave IPC
// wired directly to an SRAM master IPC (PPCI port ps_*, SRAM port sr_*).
// u_wbm and u_wbs are the master and slave IPCs of a Wishbone bus (wbm_*,
// wbs_*), u_urm and u_urs those of the UTOPIA receive interface (urm_*,
// urs_*).
// A PPCI master IPC can drive the wrapper's PPCI port and a
// DES slave IPC can stand in front of a DES core on the wrapper's DES port;
// the DES IP itself is not part of this design.  Everything runs on clk
// except the UTOPIA slaves, which run on the TxClk or RxClk they receive.
module ipc_top
  import ipc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  // PPCI slave port of the DES wrapper
  input  logic           ppci_val,
  input  logic           ppci_rnw,
  input  logic [7:0]     ppci_address,
  input  logic           ppci_eop,
  input  logic [31:0]    ppci_wdata,
  output logic           ppci_ack,
  output logic [31:0]    ppci_rdata,
  // DES IP port of the DES wrapper
  output logic           des_start,
  output logic           des_enc_dec,
  output logic [63:0]    des_pkey,
  output logic [63:0]    des_ptext,
  input  logic           des_done,
  input  logic           des_busy,
  input  logic [63:0]    des_ctext,
  // PPCI master IPC: interface ports
  output logic           pm_VAL,
  output logic           pm_RNW,
  output logic [7:0]     pm_ADDRESS,
  output logic           pm_EOP,
  output logic [31:0]    pm_WData,
  input  logic           pm_ACK,
  input  logic [31:0]    pm_RData,
  // PPCI master IPC: core ports
  input  ppci_trcode_e   pm_trcode,
  output logic           pm_trend,
  input  logic [7:0]     pm_addr_p,
  output logic           pm_addr_p_request,
  input  logic [31:0]    pm_write_data,
  output logic           pm_write_data_request,
  output logic [31:0]    pm_read_data,
  output logic           pm_read_data_load,
  // DES slave IPC: interface ports
  input  logic           ds_start,
  input  logic           ds_enc_dec,
  input  logic [63:0]    ds_pkey,
  input  logic [63:0]    ds_ptext,
  output logic           ds_done,
  output logic           ds_busy,
  output logic [63:0]    ds_ctext,
  // DES slave IPC: core ports
  output des_trcode_e    ds_trcode,
  output logic           ds_trend,
  output logic [63:0]    ds_key_p,
  output logic           ds_key_p_load,
  output logic [63:0]    ds_data_p,
  output logic           ds_data_p_load,
  input  logic [63:0]    ds_result_p,
  output logic           ds_result_p_request,
  input  logic           ds_result_p_valid,
  // DES master IPC with one shared argument port: interface ports
  output logic           d1_start,
  output logic           d1_enc_dec,
  output logic [63:0]    d1_pkey,
  output logic [63:0]    d1_ptext,
  input  logic           d1_done,
  input  logic           d1_busy,
  input  logic [63:0]    d1_ctext,
  // DES master IPC with one shared argument port: core ports
  input  des_trcode_e    d1_trcode,
  output logic           d1_trend,
  input  logic [63:0]    d1_odata_p,
  output logic [1:0]     d1_odata_p_request,
  output logic [63:0]    d1_idata_p,
  output logic           d1_idata_p_load,
  // UTOPIA transmit master: interface ports
  output logic           utm_TxSOC,
  output logic           utm_TxEnbn,
  output logic [7:0]     utm_TxData,
  output logic           utm_TxClk,
  input  logic           utm_TxFulln,
  input  logic           utm_TxClav,
  // UTOPIA transmit master: core ports
  input  utopia_trcode_e utm_trcode,
  output logic           utm_trend,
  input  logic [7:0]     utm_data,
  output logic           utm_data_request,
  // UTOPIA transmit slave: interface ports
  input  logic           uts_TxClk,
  input  logic           uts_TxSOC,
  input  logic           uts_TxEnbn,
  input  logic [7:0]     uts_TxData,
  output logic           uts_TxFulln,
  output logic           uts_TxClav,
  // UTOPIA transmit slave: core ports
  output utopia_trcode_e uts_trcode,
  output logic           uts_trend,
  output logic [7:0]     uts_data,
  output logic           uts_data_load,
  input  logic           uts_data_full,
  input  logic           uts_cell_avail,
  // PPCI slave port of the SRAM wrapper
  input  logic           ps_VAL,
  input  logic           ps_RNW,
  input  logic [7:0]     ps_ADDRESS,
  input  logic           ps_EOP,
  input  logic [31:0]    ps_WData,
  output logic           ps_ACK,
  output logic [31:0]    ps_RData,
  // SRAM port of the SRAM wrapper
  output logic           sr_CSn,
  output logic           sr_WEn,
  output logic [7:0]     sr_A,
  output logic [31:0]    sr_D,
  input  logic [31:0]    sr_Q,
  // Wishbone master IPC: interface ports
  output logic           wbm_CYC_O,
  output logic           wbm_STB_O,
  output logic           wbm_WE_O,
  output logic [31:0]    wbm_ADR_O,
  output logic [31:0]    wbm_DAT_O,
  input  logic           wbm_ACK_I,
  input  logic [31:0]    wbm_DAT_I,
  // Wishbone master IPC: core ports
  input  wb_trcode_e     wbm_trcode,
  output logic           wbm_trend,
  input  logic [31:0]    wbm_addr_p,
  output logic           wbm_addr_p_request,
  input  logic [31:0]    wbm_write_data,
  output logic           wbm_write_data_request,
  output logic [31:0]    wbm_read_data,
  output logic           wbm_read_data_load,
  // Wishbone slave IPC: interface ports
  input  logic           wbs_CYC_I,
  input  logic           wbs_STB_I,
  input  logic           wbs_WE_I,
  input  logic [31:0]    wbs_ADR_I,
  input  logic [31:0]    wbs_DAT_I,
  output logic           wbs_ACK_O,
  output logic [31:0]    wbs_DAT_O,
  // Wishbone slave IPC: core ports
  output wb_trcode_e     wbs_trcode,
  output logic           wbs_trend,
  output logic [31:0]    wbs_addr_p,
  output logic           wbs_addr_p_load,
  output logic [31:0]    wbs_write_data,
  output logic           wbs_write_data_load,
  input  logic [31:0]    wbs_read_data,
  output logic           wbs_read_data_request,
  input  logic           wbs_read_data_valid,
  // UTOPIA receive master: interface ports
  output logic           urm_RxEnbn,
  output logic           urm_RxClk,
  input  logic [7:0]     urm_RxData,
  input  logic           urm_RxSOC,
  input  logic           urm_RxClav,
  // UTOPIA receive master: core ports
  input  utopia_rx_trcode_e urm_trcode,
  output logic           urm_trend,
  output logic [7:0]     urm_data,
  output logic           urm_data_load,
  input  logic           urm_data_full,
  // UTOPIA receive slave: interface ports
  input  logic           urs_RxClk,
  input  logic           urs_RxEnbn,
  output logic [7:0]     urs_RxData,
  output logic           urs_RxSOC,
  output logic           urs_RxClav,
  // UTOPIA receive slave: core ports
  output utopia_rx_trcode_e urs_trcode,
  output logic           urs_trend,
  input  logic [7:0]     urs_data,
  output logic           urs_data_request,
  input  logic           urs_cell_avail
);

  ppci_des_wrapper u_wrap (
    .clk, .rst_n,
    .VAL (ppci_val), .RNW (ppci_rnw), .ADDRESS (ppci_address),
    .EOP (ppci_eop), .WData (ppci_wdata), .ACK (ppci_ack), .RData (ppci_rdata),
    .start (des_start), .enc_dec (des_enc_dec), .pkey (des_pkey),
    .ptext (des_ptext), .done (des_done), .busy (des_busy), .ctext (des_ctext)
  );

  ppci_master_ipc u_pm (
    .clk, .rst_n,
    .VAL (pm_VAL), .RNW (pm_RNW), .ADDRESS (pm_ADDRESS), .EOP (pm_EOP),
    .WData (pm_WData), .ACK (pm_ACK), .RData (pm_RData),
    .trcode (pm_trcode), .trend (pm_trend),
    .addr_p (pm_addr_p), .addr_p_request (pm_addr_p_request),
    .write_data (pm_write_data), .write_data_request (pm_write_data_request),
    .read_data (pm_read_data), .read_data_load (pm_read_data_load)
  );

  des_slave_ipc u_ds (
    .clk, .rst_n,
    .start (ds_start), .enc_dec (ds_enc_dec), .pkey (ds_pkey), .ptext (ds_ptext),
    .done (ds_done), .busy (ds_busy), .ctext (ds_ctext),
    .trcode (ds_trcode), .trend (ds_trend),
    .key_p (ds_key_p), .key_p_load (ds_key_p_load),
    .data_p (ds_data_p), .data_p_load (ds_data_p_load),
    .result_p (ds_result_p), .result_p_request (ds_result_p_request),
    .result_p_valid (ds_result_p_valid)
  );

  des_master_ipc_1port u_d1 (
    .clk, .rst_n,
    .start (d1_start), .enc_dec (d1_enc_dec), .pkey (d1_pkey), .ptext (d1_ptext),
    .done (d1_done), .busy (d1_busy), .ctext (d1_ctext),
    .trcode (d1_trcode), .trend (d1_trend),
    .odata_p (d1_odata_p), .odata_p_request (d1_odata_p_request),
    .idata_p (d1_idata_p), .idata_p_load (d1_idata_p_load)
  );

  utopia_tx_master_ipc u_utx (
    .clk, .rst_n,
    .TxSOC (utm_TxSOC), .TxEnbn (utm_TxEnbn), .TxData (utm_TxData),
    .TxClk (utm_TxClk), .TxFulln (utm_TxFulln), .TxClav (utm_TxClav),
    .trcode (utm_trcode), .trend (utm_trend), .data (utm_data),
    .data_request (utm_data_request)
  );

  utopia_tx_slave_ipc u_urx (
    .TxClk (uts_TxClk), .rst_n,
    .TxSOC (uts_TxSOC), .TxEnbn (uts_TxEnbn), .TxData (uts_TxData),
    .TxFulln (uts_TxFulln), .TxClav (uts_TxClav),
    .trcode (uts_trcode), .trend (uts_trend), .data (uts_data),
    .data_load (uts_data_load), .data_full (uts_data_full),
    .cell_avail (uts_cell_avail)
  );

  ppci_sram_wrapper u_sram (
    .clk, .rst_n,
    .VAL (ps_VAL), .RNW (ps_RNW), .ADDRESS (ps_ADDRESS), .EOP (ps_EOP),
    .WData (ps_WData), .ACK (ps_ACK), .RData (ps_RData),
    .CSn (sr_CSn), .WEn (sr_WEn), .A (sr_A), .D (sr_D), .Q (sr_Q)
  );

  utopia_rx_master_ipc u_urm (
    .clk, .rst_n,
    .RxEnbn (urm_RxEnbn), .RxClk (urm_RxClk), .RxData (urm_RxData),
    .RxSOC (urm_RxSOC), .RxClav (urm_RxClav),
    .trcode (urm_trcode), .trend (urm_trend), .data (urm_data),
    .data_load (urm_data_load), .data_full (urm_data_full)
  );

  utopia_rx_slave_ipc u_urs (
    .RxClk (urs_RxClk), .rst_n,
    .RxEnbn (urs_RxEnbn), .RxData (urs_RxData), .RxSOC (urs_RxSOC),
    .RxClav (urs_RxClav),
    .trcode (urs_trcode), .trend (urs_trend), .data (urs_data),
    .data_request (urs_data_request), .cell_avail (urs_cell_avail)
  );

  wishbone_master_ipc #(.ADR_W(32), .DAT_W(32)) u_wbm (
    .clk, .rst_n,
    .CYC_O (wbm_CYC_O), .STB_O (wbm_STB_O), .WE_O (wbm_WE_O),
    .ADR_O (wbm_ADR_O), .DAT_O (wbm_DAT_O), .ACK_I (wbm_ACK_I), .DAT_I (wbm_DAT_I),
    .trcode (wbm_trcode), .trend (wbm_trend),
    .addr_p (wbm_addr_p), .addr_p_request (wbm_addr_p_request),
    .write_data (wbm_write_data), .write_data_request (wbm_write_data_request),
    .read_data (wbm_read_data), .read_data_load (wbm_read_data_load)
  );

  wishbone_slave_ipc #(.ADR_W(32), .DAT_W(32)) u_wbs (
    .clk, .rst_n,
    .CYC_I (wbs_CYC_I), .STB_I (wbs_STB_I), .WE_I (wbs_WE_I),
    .ADR_I (wbs_ADR_I), .DAT_I (wbs_DAT_I), .ACK_O (wbs_ACK_O), .DAT_O (wbs_DAT_O),
    .trcode (wbs_trcode), .trend (wbs_trend),
    .addr_p (wbs_addr_p), .addr_p_load (wbs_addr_p_load),
    .write_data (wbs_write_data), .write_data_load (wbs_write_data_load),
    .read_data (wbs_read_data), .read_data_request (wbs_read_data_request),
    .read_data_valid (wbs_read_data_valid)
  );

endmodule
