// tb_workload_rain: two days of a sensor-network receiver with a rain fade.
// The receiver (at default parameters, 30-minute update period) hears three
// neighbours that each send one packet every 15 minutes. Dry-weather link
// RSSIs are -58, -61 and -66 dBm with +-2 dB of slow fading; from hour 20 to
// hour 30 the path loss rises tenfold (-10 dB), as in a rain event. A packet
// is received only if its RSSI is at or above the sensitivity of the entry
// the receiver is in. The table holds eight example entries from -82 dBm
// (entry 0) to -63 dBm; the margin is 3 dB. Checked: the receiver leaves
// the most sensitive entry while the link is dry, is back at a sensitivity
// that hears every neighbour within one period after the fade starts, stays
// in a cheaper entry again after the rain, and the packet reception ratio
// stays at or above 95 %. Only the packet-level signals drive the receiver;
// no samples are sent.
module tb_workload_rain;
  import rx_pkg::*;

  logic clk = 0, rst_n = 0;
  logic pkt_ok = 0, sec_tick = 0, tbl_we = 0;
  logic signed [7:0] pkt_rssi = '0, tbl_rsens = '0;
  logic [3:0] tbl_addr = '0;
  rx_cfg_t tbl_cfg = '0, cfg;
  logic [4:0] tbl_len = '0;
  logic [6:0] margin = '0;
  aaf_cfg_e aaf;
  logic [3:0] cfg_idx, sym;
  logic cfg_update, sym_valid, dout_valid, dout, pkt_done;
  logic [5:0] chip_err;
  logic [4:0] corr_cnt;
  logic signed [7:0] rsens, rssi_min;
  logic [15:0] epc, rpc;
  logic upd_dec, upd_rst, upd_inc, acd_busy;
  int checks = 0, failures = 0;

  receiver_top dut (
    .clk(clk), .rst_n(rst_n), .adc_valid_i(1'b0), .adc_i_i(8'sd0), .adc_q_i(8'sd0),
    .pkt_sync_i(1'b0), .pkt_ok_i(pkt_ok), .pkt_rssi_i(pkt_rssi), .sec_tick_i(sec_tick),
    .tbl_we_i(tbl_we), .tbl_addr_i(tbl_addr), .tbl_rsens_i(tbl_rsens), .tbl_cfg_i(tbl_cfg),
    .tbl_len_i(tbl_len), .margin_i(margin), .aaf_cfg_o(aaf), .cfg_o(cfg), .cfg_idx_o(cfg_idx),
    .cfg_update_o(cfg_update), .sym_valid_o(sym_valid), .sym_o(sym), .chip_err_o(chip_err),
    .dout_valid_o(dout_valid), .dout_o(dout), .pkt_done_o(pkt_done), .corr_cnt_o(corr_cnt),
    .cfg_rsens_o(rsens), .cfg_epc_o(epc), .cfg_rpc_o(rpc), .cfg_rssi_min_o(rssi_min),
    .cfg_dec_o(upd_dec), .cfg_rst_o(upd_rst), .cfg_inc_o(upd_inc), .acd_busy_o(acd_busy));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NT = 8;
  localparam int RS [NT] = '{-82, -79, -76, -73, -70, -68, -66, -63};
  localparam int LINK [3] = '{-58, -61, -66};
  localparam int DAY_S = 48 * 3600;

  // Update steps reported by the configurator. After each update the
  // counters of the period restart, the reported sensitivity is that of the
  // new entry, and the decoder stays idle (no samples are sent).
  int n_upd = 0, n_dec = 0, n_rst = 0, n_inc = 0, n_bad = 0;
  always @(posedge clk) if (rst_n) begin
    if (upd_dec || upd_rst || upd_inc) begin
      n_upd++;
      if (upd_dec) n_dec++;
      if (upd_rst) n_rst++;
      if (upd_inc) n_inc++;
      if (rpc != 0 || rssi_min != 8'sd127 || 32'(rsens) != RS[cfg_idx]) n_bad++;
    end
    if (acd_busy) n_bad++;
  end

  initial begin
    int sent, got, fade, sec_dry_low, rain_ok_updates, rain_updates, after_low;
    int t_upd;
    sent = 0; got = 0; sec_dry_low = 0; rain_ok_updates = 0; rain_updates = 0; after_low = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NT; i++) begin
      tbl_we = 1; tbl_addr = 4'(i); tbl_rsens = 8'(RS[i]);
      tbl_cfg = rx_cfg_t'(12'(i * 131 + 3));
      @(negedge clk);
    end
    tbl_we = 0;
    tbl_len = 5'(NT);
    margin = 7'd3;
    for (int t = 0; t < DAY_S; t++) begin
      bit rain;
      rain = (t >= 20 * 3600) && (t < 30 * 3600);
      // Packets of the three neighbours, spread over the 15-minute cycle.
      for (int n = 0; n < 3; n++) begin
        if (t % 900 == 100 + 250 * n) begin
          int r;
          r = LINK[n] + int'($urandom_range(4, 0)) - 2 - (rain ? 10 : 0);
          sent++;
          if (r >= RS[cfg_idx]) begin
            got++;
            pkt_ok = 1;
            pkt_rssi = 8'(r);
            @(negedge clk);
            pkt_ok = 0;
          end
        end
      end
      sec_tick = 1;
      @(negedge clk);
      sec_tick = 0;
      @(negedge clk);
      if (t >= 2 * 3600 && t < 20 * 3600 && cfg_idx != 0) sec_dry_low++;
      if (t >= 40 * 3600 && cfg_idx != 0) after_low++;
      // One period after the fade started, every neighbour must be heard.
      if (rain && t >= 21 * 3600 && (t + 1) % 1800 == 0) begin
        rain_updates++;
        if (RS[cfg_idx] <= LINK[2] - 10 - 2) rain_ok_updates++;
      end
    end
    $display("packets sent %0d received %0d; dry seconds in a cheaper entry %0d of %0d; after rain %0d",
             sent, got, sec_dry_low, 18 * 3600, after_low);
    $display("rain periods hearing all neighbours %0d of %0d", rain_ok_updates, rain_updates);
    check(sec_dry_low > 9 * 3600, "sensitivity lowered for most of the dry time");
    check(rain_ok_updates == rain_updates && rain_updates > 0, "sensitivity raised for the rain");
    check(after_low > 4 * 3600, "sensitivity lowered again after the rain");
    $display("update steps taken: decrease %0d reset %0d increase %0d", n_dec, n_rst, n_inc);
    check(n_dec > 0 && n_rst + n_inc > 0, "both directions of the update rule used");
    check(n_upd == n_dec + n_rst + n_inc, "at most one step per update");
    check(n_bad == 0, "counters and sensitivity after each update");
    check(epc != 0, "expected packet count learned in entry 0");
    check(got * 100 >= sent * 95, $sformatf("packet reception ratio %0d of %0d", got, sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
