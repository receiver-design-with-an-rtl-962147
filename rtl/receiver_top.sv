// receiver_top: digital part of the adjustable IoT receiver.
//
// The receiver trades signal quality for energy per bit at run time. Its
// three adjustable parts are the analog front end (AAF), the digital
// baseband (ADB) and the channel decoder (ACD); a configurator sets all
// three from one table of Pareto-optimal configurations, using the RSSI and
// count of received packets. This module holds the digital parts: the ADB
// (adb_demod: IEEE 802.15.4 O-QPSK/DSSS demodulator with comparator,
// filter-bypass and under-sampling knobs), the ACD (acd_decoder: block
// deinterleaver plus Hamming (31,26), or uncoded) and the configurator
// (cfg_configurator). The AAF and the ADC are analog and are outside: the
// front-end setting leaves on aaf_cfg_o, ADC samples come in on adc_*, and
// the packet RSSI measured in the radio comes in on pkt_rssi_i.
//
// Data flow: adc_i/adc_q -> adb_demod -> 4-bit symbols -> acd_decoder ->
// payload bit stream dout_*. The ADB and ACD settings are taken from the
// configurator's current entry every cycle, so they change on the fly.
//
// Interface and timing: one clock, the 6 MHz ADC sample clock; adc_valid_i
// marks a sample. pkt_sync_i is given with the first payload sample of a
// packet (frame synchronisation is outside this design) and restarts both
// the symbol grid and the decoder. pkt_ok_i pulses once per packet that the
// MAC accepted, with its RSSI. sec_tick_i is a one-per-second tick for the
// update period. The table is written through tbl_*. The cfg_* status
// outputs show the configurator's counters and, with cfg_update_o, which
// step of the update rule was applied; acd_busy_o is high while the decoder
// is collecting or draining a packet.
module receiver_top
  import rx_pkg::*;
#(
  parameter int unsigned N_PARETO = 16,
  parameter int unsigned RSSI_W   = 8,
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned PERIOD_S = 1800
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // ADC
  input  logic                        adc_valid_i,
  input  logic signed [ADC_W-1:0]     adc_i_i,
  input  logic signed [ADC_W-1:0]     adc_q_i,
  // packet framing and quality from the radio / MAC
  input  logic                        pkt_sync_i,
  input  logic                        pkt_ok_i,
  input  logic signed [RSSI_W-1:0]    pkt_rssi_i,
  input  logic                        sec_tick_i,
  // Pareto table
  input  logic                        tbl_we_i,
  input  logic [$clog2(N_PARETO)-1:0] tbl_addr_i,
  input  logic signed [RSSI_W-1:0]    tbl_rsens_i,
  input  rx_cfg_t                     tbl_cfg_i,
  input  logic [$clog2(N_PARETO):0]   tbl_len_i,
  input  logic [RSSI_W-2:0]           margin_i,
  // front-end setting (C_aaf)
  output aaf_cfg_e                    aaf_cfg_o,
  // current configuration
  output rx_cfg_t                     cfg_o,
  output logic [$clog2(N_PARETO)-1:0] cfg_idx_o,
  output logic                        cfg_update_o,
  // configurator state: sensitivity of the current entry, expected and
  // received packet counts and lowest RSSI of the running period, and which
  // of decrease / reset / increase the last update applied
  output logic signed [RSSI_W-1:0]    cfg_rsens_o,
  output logic [CNT_W-1:0]            cfg_epc_o,
  output logic [CNT_W-1:0]            cfg_rpc_o,
  output logic signed [RSSI_W-1:0]    cfg_rssi_min_o,
  output logic                        cfg_dec_o,
  output logic                        cfg_rst_o,
  output logic                        cfg_inc_o,
  // symbols and baseband quality (Q_adb)
  output logic                        sym_valid_o,
  output logic [SYM_BITS-1:0]         sym_o,
  output logic [5:0]                  chip_err_o,
  // payload and decoder quality (Q_acd)
  output logic                        dout_valid_o,
  output logic                        dout_o,
  output logic                        pkt_done_o,
  output logic [4:0]                  corr_cnt_o,
  output logic                        acd_busy_o
);

  rx_cfg_t cfg;

  cfg_configurator #(
    .N_PARETO (N_PARETO),
    .RSSI_W   (RSSI_W),
    .CNT_W    (CNT_W),
    .PERIOD_S (PERIOD_S)
  ) u_cfg (
    .clk         (clk),
    .rst_n       (rst_n),
    .tbl_we_i    (tbl_we_i),
    .tbl_addr_i  (tbl_addr_i),
    .tbl_rsens_i (tbl_rsens_i),
    .tbl_cfg_i   (tbl_cfg_i),
    .tbl_len_i   (tbl_len_i),
    .margin_i    (margin_i),
    .pkt_rx_i    (pkt_ok_i),
    .pkt_rssi_i  (pkt_rssi_i),
    .sec_tick_i  (sec_tick_i),
    .cfg_o       (cfg),
    .cfg_idx_o   (cfg_idx_o),
    .rsens_o     (cfg_rsens_o),
    .epc_o       (cfg_epc_o),
    .rpc_o       (cfg_rpc_o),
    .rssi_min_o  (cfg_rssi_min_o),
    .update_o    (cfg_update_o),
    .dec_o       (cfg_dec_o),
    .rst_o       (cfg_rst_o),
    .inc_o       (cfg_inc_o)
  );

  adb_demod u_adb (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg_i       (cfg.adb),
    .sync_i      (pkt_sync_i),
    .in_valid_i  (adc_valid_i),
    .i_i         (adc_i_i),
    .q_i         (adc_q_i),
    .sym_valid_o (sym_valid_o),
    .sym_o       (sym_o),
    .chip_err_o  (chip_err_o)
  );

  acd_decoder u_acd (
    .clk          (clk),
    .rst_n        (rst_n),
    .coded_i      (cfg.coded),
    .pkt_start_i  (pkt_sync_i),
    .sym_valid_i  (sym_valid_o),
    .sym_i        (sym_o),
    .dout_valid_o (dout_valid_o),
    .dout_o       (dout_o),
    .pkt_done_o   (pkt_done_o),
    .corr_cnt_o   (corr_cnt_o),
    .busy_o       (acd_busy_o)
  );

  assign aaf_cfg_o = cfg.aaf;
  assign cfg_o     = cfg;

endmodule
