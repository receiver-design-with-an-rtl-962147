// tb_receiver_top: end-to-end test of the receiver at its default
// parameters (30-minute update period, i.e. 1800 one-second ticks).
// A Pareto table of six example configurations is loaded, from the most
// sensitive (coded, full baseband) to the least sensitive (uncoded,
// comparators on, three filter stages bypassed, under-sampling). Packets are
// generated as O-QPSK samples: coded packets carry 16 interleaved Hamming
// (31,26) code words with a burst error (one wrong DSSS symbol), uncoded
// packets carry random symbols. Between packets the configurator updates and
// must walk through: decrease sensitivity, increase sensitivity, reset to
// the most sensitive entry after a lost packet. The decoded payload of each
// packet is compared bit by bit. Every mechanism (coded and uncoded
// reception, error correction, comparator, filter bypass, under-sampling,
// the three kinds of update) is counted and must occur. Before each update
// the configurator's RPC and RSSI_min are compared with the packets sent;
// after it, the step it reports must be the one expected.
module tb_receiver_top;
  import rx_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0, pkt_sync = 0, pkt_ok = 0, sec_tick = 0, tbl_we = 0;
  logic signed [7:0] adc_i = '0, adc_q = '0, pkt_rssi = '0, tbl_rsens = '0;
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
    .clk(clk), .rst_n(rst_n), .adc_valid_i(adc_valid), .adc_i_i(adc_i), .adc_q_i(adc_q),
    .pkt_sync_i(pkt_sync), .pkt_ok_i(pkt_ok), .pkt_rssi_i(pkt_rssi), .sec_tick_i(sec_tick),
    .tbl_we_i(tbl_we), .tbl_addr_i(tbl_addr), .tbl_rsens_i(tbl_rsens), .tbl_cfg_i(tbl_cfg),
    .tbl_len_i(tbl_len), .margin_i(margin), .aaf_cfg_o(aaf), .cfg_o(cfg), .cfg_idx_o(cfg_idx),
    .cfg_update_o(cfg_update), .cfg_rsens_o(rsens), .cfg_epc_o(epc), .cfg_rpc_o(rpc),
    .cfg_rssi_min_o(rssi_min), .cfg_dec_o(upd_dec), .cfg_rst_o(upd_rst), .cfg_inc_o(upd_inc),
    .sym_valid_o(sym_valid), .sym_o(sym), .chip_err_o(chip_err),
    .dout_valid_o(dout_valid), .dout_o(dout), .pkt_done_o(pkt_done), .corr_cnt_o(corr_cnt), .acd_busy_o(acd_busy));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Example Pareto table: sensitivity in dBm and configuration.
  localparam int NT = 6;
  localparam int RS [NT] = '{-82, -79, -76, -72, -68, -64};
  function automatic rx_cfg_t tcfg(int i);
    rx_cfg_t c;
    c = '0;
    case (i)
      0: begin c.aaf = AAF_L18_LM1; c.coded = 1; end
      1: begin c.aaf = AAF_L12_SM1; c.coded = 1; c.adb.cmp_i = 1; end
      2: begin c.aaf = AAF_LB_LM1; c.adb.cmp_i = 1; c.adb.cmp_q = 1; end
      3: begin c.aaf = AAF_LB_LM1; c.adb.cmp_i = 1; c.adb.byp_q = 2'b01; end
      4: begin c.aaf = AAF_LB_SM1; c.adb.cmp_i = 1; c.adb.cmp_q = 1;
               c.adb.byp_i = 2'b11; c.adb.byp_q = 2'b01; end
      default: begin c.aaf = AAF_LB_SM1; c.adb.cmp_i = 1; c.adb.cmp_q = 1;
               c.adb.byp_i = 2'b11; c.adb.byp_q = 2'b01; c.adb.undersample = 1; end
    endcase
    return c;
  endfunction

  // Mechanism counters.
  int n_coded = 0, n_uncoded = 0, n_corr = 0, n_cmp = 0, n_byp = 0, n_us = 0;
  int n_dec = 0, n_inc = 0, n_rst = 0;

  // Packets accepted and lowest RSSI in the running period (reference).
  int p_rx = 0, p_min = 127;
  // Update steps reported by the configurator, and busy cycles of the
  // decoder.
  int u_dec = 0, u_rst = 0, u_inc = 0, u_cnt = 0, n_busy = 0;
  always @(posedge clk) if (rst_n) begin
    if (cfg_update) begin
      u_cnt++;
      if (upd_dec) u_dec++;
      if (upd_rst) u_rst++;
      if (upd_inc) u_inc++;
    end
    if (acd_busy) n_busy++;
  end

  logic out_bits [$];
  always @(posedge clk) if (dout_valid) out_bits.push_back(dout);

  // Send one packet of 4-bit symbols as O-QPSK samples (with 3 tail samples
  // for the last Q chip). bad_sym >= 0 replaces that symbol's chips by those
  // of another symbol.
  task automatic send(int syms [$], int bad_sym, int nz);
    int L, n;
    int iv [], qv [];
    n = syms.size();
    L = 96 * n + 3;
    iv = new[L];
    qv = new[L];
    for (int t = 0; t < L; t++) begin iv[t] = 0; qv[t] = 0; end
    for (int s = 0; s < n; s++) begin
      int tx;
      tx = (s == bad_sym) ? (syms[s] ^ 4'hF) : syms[s];
      for (int k = 0; k < 16; k++)
        for (int m = 0; m < 6; m++) begin
          iv[96*s + 6*k + m]     += (chip_of(tx, 2*k) ? 1 : -1) * HALF_SINE[m];
          qv[96*s + 6*k + 3 + m] += (chip_of(tx, 2*k+1) ? 1 : -1) * HALF_SINE[m];
        end
    end
    for (int t = 0; t < L; t++) begin
      adc_i = sat8(iv[t] + noise(nz));
      adc_q = sat8(qv[t] + noise(nz));
      adc_valid = 1;
      pkt_sync = (t == 0);
      @(negedge clk);
      adc_valid = 0;
      pkt_sync = 0;
    end
  endtask

  // Receive one packet in the current configuration and check its payload.
  task automatic packet(int nz, bit ok, int rssi);
    int syms [$];
    logic exp_bits [$];
    rx_cfg_t c;
    c = cfg;
    out_bits.delete();
    if (c.coded) begin
      logic [25:0] pay [16];
      logic [30:0] cw [16];
      logic tx [496];
      for (int r = 0; r < 16; r++) begin
        pay[r] = 26'($urandom);
        cw[r] = ham_encode(pay[r]);
      end
      for (int j = 0; j < 496; j++) tx[j] = cw[j % 16][j / 16];
      for (int s = 0; s < 124; s++) syms.push_back({tx[4*s+3], tx[4*s+2], tx[4*s+1], tx[4*s]});
      for (int b = 0; b < 416; b++) exp_bits.push_back(pay[b / 26][b % 26]);
      send(syms, 37, nz);
      repeat (430) @(negedge clk);
      n_coded++;
      check(corr_cnt == 5'd4, $sformatf("four code words corrected, got %0d", corr_cnt));
      if (corr_cnt != 0) n_corr++;
    end else begin
      for (int s = 0; s < 40; s++) syms.push_back($urandom_range(15, 0));
      for (int b = 0; b < 160; b++) exp_bits.push_back(1'(syms[b / 4] >> (b % 4)));
      send(syms, -1, nz);
      repeat (10) @(negedge clk);
      n_uncoded++;
    end
    if (c.adb.cmp_i || c.adb.cmp_q) n_cmp++;
    if (c.adb.byp_i != 0 || c.adb.byp_q != 0) n_byp++;
    if (c.adb.undersample) n_us++;
    check(out_bits.size() == exp_bits.size(),
          $sformatf("payload size %0d expected %0d", out_bits.size(), exp_bits.size()));
    if (out_bits.size() == exp_bits.size())
      for (int b = 0; b < exp_bits.size(); b++)
        check(out_bits[b] == exp_bits[b], $sformatf("entry %0d payload bit %0d", cfg_idx, b));
    if (ok) begin
      pkt_ok = 1;
      pkt_rssi = 8'(rssi);
      @(negedge clk);
      pkt_ok = 0;
      p_rx++;
      if (rssi < p_min) p_min = rssi;
    end
    repeat (20) @(negedge clk);
  endtask

  // Let one update period pass.
  task automatic period(int exp_idx, int kind);
    int old, d0, r0, i0;
    old = int'(cfg_idx);
    d0 = u_dec; r0 = u_rst; i0 = u_inc;
    check(32'(rpc) == p_rx, $sformatf("received packet count %0d expected %0d", rpc, p_rx));
    check(32'(rssi_min) == p_min, $sformatf("RSSI_min %0d expected %0d", rssi_min, p_min));
    check(32'(rsens) == RS[old], "sensitivity of the current entry");
    for (int s = 0; s < 1800; s++) begin
      sec_tick = 1;
      @(negedge clk);
      sec_tick = 0;
      @(negedge clk);
      if (s == 1798) check(cfg_idx == 4'(old), "no change before the period ends");
    end
    check(32'(cfg_idx) == exp_idx, $sformatf("entry %0d expected %0d", cfg_idx, exp_idx));
    check(aaf == tcfg(exp_idx).aaf, "front-end setting follows the entry");
    check(cfg == tcfg(exp_idx), "configuration follows the entry");
    check(rpc == 0 && rssi_min == 8'sd127, "counters restart after the update");
    check(u_dec - d0 == (kind == 1 ? 1 : 0) && u_rst - r0 == (kind == 3 ? 1 : 0)
          && u_inc - i0 == (kind == 2 ? 1 : 0), "configurator reports the expected step");
    p_rx = 0;
    p_min = 127;
    case (kind)
      1: if (exp_idx > old) n_dec++;
      2: if (exp_idx < old) n_inc++;
      3: if (exp_idx == 0 && old != 0) n_rst++;
      default: ;
    endcase
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NT; i++) begin
      tbl_we = 1; tbl_addr = 4'(i); tbl_rsens = 8'(RS[i]); tbl_cfg = tcfg(i);
      @(negedge clk);
    end
    tbl_we = 0;
    tbl_len = 5'(NT);
    margin = 7'd3;
    @(negedge clk);
    check(cfg_idx == 0 && cfg == tcfg(0), "start in the most sensitive entry");
    // Strong link: coded packet, then sensitivity is lowered to entry 5.
    packet(20, 1, -60);
    period(5, 1);
    // Uncoded packet with comparators, bypassed filters and under-sampling.
    packet(10, 1, -62);
    // -62 dBm is within the margin of entry 5 (-64 + 3): go to entry 4.
    period(4, 2);
    // The only packet of this period is lost (EPC = 1 > RPC = 0): back to
    // entry 0.
    packet(15, 0, 0);
    period(0, 3);
    packet(20, 1, -70);
    // -70 dBm: the least sensitive entry at least 3 dB below it is entry 2.
    period(2, 1);
    packet(15, 1, -71);
    $display("coded %0d uncoded %0d corrected %0d comparator %0d bypass %0d undersample %0d",
             n_coded, n_uncoded, n_corr, n_cmp, n_byp, n_us);
    $display("decrease %0d increase %0d reset %0d", n_dec, n_inc, n_rst);
    check(n_coded > 0, "coded reception happened");
    check(n_uncoded > 0, "uncoded reception happened");
    check(n_corr > 0, "error correction happened");
    check(n_cmp > 0, "comparator used");
    check(n_byp > 0, "filter bypass used");
    check(n_us > 0, "under-sampling used");
    check(n_dec > 0, "sensitivity decreased");
    check(n_inc > 0, "sensitivity increased");
    check(n_rst > 0, "sensitivity reset");
    check(u_cnt == 4, $sformatf("four updates, got %0d", u_cnt));
    check(n_busy > 0, "decoder busy seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
