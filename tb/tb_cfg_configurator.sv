// tb_cfg_configurator: runs the sensitivity-adjustment decision over many
// update periods against a reference model.
// A table of eight example configurations (sensitivities -82 ... -63 dBm,
// margin 3 dB) is loaded; in each period a random number of packets with
// RSSIs around a slowly drifting channel level is reported, sometimes none.
// After every update the chosen entry, the output configuration, the branch
// flags, RPC/RSSI_min restart and EPC are compared with the model. Each
// branch (decrease, reset, increase, keep) must occur at least once. The
// update period is shortened to 3 seconds.
module tb_cfg_configurator;
  import rx_pkg::*;

  localparam int N = 16;
  localparam int PER = 3;
  logic clk = 0, rst_n = 0, we = 0, pkt = 0, tick = 0;
  logic [3:0] addr = '0;
  logic signed [7:0] rs_in = '0, rssi = '0;
  rx_cfg_t cfg_in = '0, cfg_out;
  logic [4:0] len;
  logic [6:0] margin;
  logic [3:0] idx;
  logic signed [7:0] rsens, rmin;
  logic [15:0] epc, rpc;
  logic upd, dec, rst, inc;
  int checks = 0, failures = 0;

  cfg_configurator #(.N_PARETO(N), .RSSI_W(8), .CNT_W(16), .PERIOD_S(PER)) dut (
    .clk(clk), .rst_n(rst_n), .tbl_we_i(we), .tbl_addr_i(addr), .tbl_rsens_i(rs_in),
    .tbl_cfg_i(cfg_in), .tbl_len_i(len), .margin_i(margin), .pkt_rx_i(pkt), .pkt_rssi_i(rssi),
    .sec_tick_i(tick), .cfg_o(cfg_out), .cfg_idx_o(idx), .rsens_o(rsens), .epc_o(epc),
    .rpc_o(rpc), .rssi_min_o(rmin), .update_o(upd), .dec_o(dec), .rst_o(rst), .inc_o(inc));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int TBL [8] = '{-82, -79, -76, -73, -70, -68, -66, -63};
  localparam int R = 3;
  int m_idx = 0, m_epc = 0, m_rpc = 0, m_min = 127;
  int n_dec = 0, n_rst = 0, n_inc = 0, n_keep = 0;

  // Least sensitive entry whose sensitivity plus margin is below RSSI_min.
  function automatic int best(int rmin_v);
    int b;
    b = 0;
    for (int i = 0; i < 8; i++) if (TBL[i] + R < rmin_v) b = i;
    return b;
  endfunction

  task automatic model_update(output int kind);
    if (m_idx == 0) m_epc = m_rpc;
    if (TBL[m_idx] + 2 * R < m_min && m_epc <= m_rpc) begin
      m_idx = best(m_min); kind = 1;
    end else if (m_epc > m_rpc) begin
      m_idx = 0; kind = 2;
    end else if (m_min < TBL[m_idx] + R) begin
      m_idx = best(m_min); kind = 3;
    end else kind = 0;
    m_rpc = 0;
    m_min = 127;
  endtask

  initial begin
    int level, kind, npk, sec;
    len = 5'd8;
    margin = 7'(R);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      we = 1; addr = 4'(i); rs_in = 8'(TBL[i]);
      cfg_in = rx_cfg_t'(12'(i * 97 + 5));
      @(negedge clk);
    end
    we = 0;
    check(idx == 0 && rsens == -82, "reset selects the most sensitive entry");
    level = -60;
    for (int p = 0; p < 300; p++) begin
      // Channel drift: mostly small steps, sometimes a jump (rain).
      level += int'($urandom_range(6, 0)) - 3;
      if ($urandom_range(15, 0) == 0) level += ($urandom_range(1, 0) ? 15 : -15);
      if (level > -45) level = -45;
      if (level < -95) level = -95;
      npk = $urandom_range(6, 0);
      // Packets below the current sensitivity are lost.
      sec = 0;
      for (int k = 0; k < npk; k++) begin
        int r;
        r = level + int'($urandom_range(8, 0)) - 4;
        if (r >= TBL[m_idx]) begin
          pkt = 1; rssi = 8'(r);
          m_rpc++;
          if (r < m_min) m_min = r;
          @(negedge clk);
          pkt = 0;
        end
        @(negedge clk);
      end
      check(32'(rpc) == m_rpc, "RPC counts the packets");
      if (m_rpc > 0) check(32'(signed'(rmin)) == m_min, "RSSI_min tracks the weakest packet");
      for (int s = 0; s < PER; s++) begin
        tick = 1;
        @(negedge clk);
        tick = 0;
        if (s < PER - 1) begin
          @(negedge clk);
          check(!upd, "no update before the period ends");
        end
      end
      model_update(kind);
      check(upd, "update after PERIOD_S ticks");
      check(32'(idx) == m_idx, $sformatf("period %0d entry %0d expected %0d", p, idx, m_idx));
      check(cfg_out == rx_cfg_t'(12'(m_idx * 97 + 5)), "configuration of the chosen entry");
      check(32'(signed'(rsens)) == TBL[m_idx], "sensitivity of the chosen entry");
      check(dec == (kind == 1) && rst == (kind == 2) && inc == (kind == 3), "branch flags");
      check(32'(epc) == m_epc, "EPC");
      check(rpc == 0 && rmin == 127, "RPC and RSSI_min restart");
      case (kind) 1: n_dec++; 2: n_rst++; 3: n_inc++; default: n_keep++; endcase
      @(negedge clk);
    end
    $display("decrease %0d reset %0d increase %0d keep %0d", n_dec, n_rst, n_inc, n_keep);
    check(n_dec > 0 && n_rst > 0 && n_inc > 0 && n_keep > 0, "every branch taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
