// cfg_configurator: run-time sensitivity adjustment of the receiver.
//
// The configurator holds a table of Pareto-optimal receiver configurations
// (front end, baseband and decoder settings) with the sensitivity R_sens of
// each, sorted from the most sensitive (entry 0, R_sens,max, highest energy
// per bit) to the least sensitive (lowest energy per bit). While packets
// come in it keeps the lowest packet RSSI (RSSI_min) and the received
// packet count (RPC). Every update period it runs the decision:
//   1. if the current entry is entry 0: EPC <- RPC (expected packet count);
//   2. if R_sens(c) + 2r < RSSI_min and EPC <= RPC: move to the least
//      sensitive entry whose R_sens + r < RSSI_min (decrease sensitivity);
//   3. else if EPC > RPC (packets were lost): move to entry 0;
//   4. else if RSSI_min < R_sens(c) + r: move to the least sensitive entry
//      whose R_sens + r < RSSI_min, or entry 0 if none (increase
//      sensitivity);
// then RSSI_min and RPC restart for the next period.
// Choosing "the least sensitive entry with R_sens + r < RSSI_min" in steps
// 2 and 4, and the condition of step 4, are this design's reading of the
// rule that the chosen sensitivity must stay better than RSSI_min by the
// margin r. The decision itself, EPC, RPC, RSSI_min, the margins r and 2r
// and the 30-minute period follow the design description. One update takes
// one clock cycle.
//
// Interface: tbl_we_i / tbl_addr_i / tbl_rsens_i / tbl_cfg_i write a table
// entry; tbl_len_i is the number of valid entries. margin_i is r in dB.
// pkt_rx_i pulses for every correctly received packet with its RSSI in
// pkt_rssi_i (dBm). sec_tick_i is a one-per-second tick; after PERIOD_S
// ticks the decision runs. cfg_o / cfg_idx_o / rsens_o give the current
// configuration. update_o pulses after each decision; dec_o, rst_o and
// inc_o tell which branch was taken in it.
// Reset: entry 0 (highest sensitivity), EPC = 0, RPC = 0, RSSI_min at its
// largest value.
module cfg_configurator
  import rx_pkg::*;
#(
  parameter int unsigned N_PARETO = 16,
  parameter int unsigned RSSI_W   = 8,
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned PERIOD_S = 1800
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // Pareto table
  input  logic                        tbl_we_i,
  input  logic [$clog2(N_PARETO)-1:0] tbl_addr_i,
  input  logic signed [RSSI_W-1:0]    tbl_rsens_i,
  input  rx_cfg_t                     tbl_cfg_i,
  input  logic [$clog2(N_PARETO):0]   tbl_len_i,
  input  logic [RSSI_W-2:0]           margin_i,
  // signal quality
  input  logic                        pkt_rx_i,
  input  logic signed [RSSI_W-1:0]    pkt_rssi_i,
  input  logic                        sec_tick_i,
  // configuration
  output rx_cfg_t                     cfg_o,
  output logic [$clog2(N_PARETO)-1:0] cfg_idx_o,
  output logic signed [RSSI_W-1:0]    rsens_o,
  output logic [CNT_W-1:0]            epc_o,
  output logic [CNT_W-1:0]            rpc_o,
  output logic signed [RSSI_W-1:0]    rssi_min_o,
  output logic                        update_o,
  output logic                        dec_o,
  output logic                        rst_o,
  output logic                        inc_o
);

  localparam int unsigned IDX_W = $clog2(N_PARETO);
  localparam int unsigned EW    = RSSI_W + 2;   // headroom for R_sens + 2r
  localparam int unsigned TW    = $clog2(PERIOD_S + 1);
  localparam logic signed [RSSI_W-1:0] RSSI_TOP = {1'b0, {(RSSI_W-1){1'b1}}};

  logic signed [RSSI_W-1:0] rsens_mem [N_PARETO];
  rx_cfg_t                  cfg_mem   [N_PARETO];

  logic [TW-1:0]    sec_cnt;
  logic             do_update;
  logic [IDX_W-1:0] idx_q, best_idx, next_idx;
  logic [CNT_W-1:0] epc_q, rpc_q, epc_now;
  logic signed [RSSI_W-1:0] rssi_min_q;
  logic signed [EW-1:0]     rs_cur, r_ext, rmin_ext;
  logic             c_dec, c_rst, c_inc;

  // Pareto table.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PARETO; i++) begin
        rsens_mem[i] <= '0;
        cfg_mem[i]   <= '0;
      end
    end else if (tbl_we_i) begin
      rsens_mem[tbl_addr_i] <= tbl_rsens_i;
      cfg_mem[tbl_addr_i]   <= tbl_cfg_i;
    end
  end

  // Update period.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 sec_cnt <= '0;
    else if (do_update)         sec_cnt <= '0;
    else if (sec_tick_i)        sec_cnt <= sec_cnt + 1'b1;
  end
  assign do_update = sec_tick_i && (32'(sec_cnt) == PERIOD_S - 1);

  // Decision (combinational part).
  assign rs_cur   = EW'(rsens_mem[idx_q]);
  assign r_ext    = EW'({1'b0, margin_i});
  assign rmin_ext = EW'(rssi_min_q);
  assign epc_now  = (idx_q == '0) ? rpc_q : epc_q;

  always_comb begin
    best_idx = '0;
    for (int i = 0; i < N_PARETO; i++)
      if (i < 32'(tbl_len_i) && (EW'(rsens_mem[i]) + r_ext < rmin_ext))
        best_idx = IDX_W'(i);
  end

  always_comb begin
    c_dec = 1'b0;
    c_rst = 1'b0;
    c_inc = 1'b0;
    next_idx = idx_q;
    if ((rs_cur + 2 * r_ext < rmin_ext) && (epc_now <= rpc_q)) begin
      c_dec    = 1'b1;
      next_idx = best_idx;
    end else if (epc_now > rpc_q) begin
      c_rst    = 1'b1;
      next_idx = '0;
    end else if (rmin_ext < rs_cur + r_ext) begin
      c_inc    = 1'b1;
      next_idx = best_idx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q      <= '0;
      epc_q      <= '0;
      rpc_q      <= '0;
      rssi_min_q <= RSSI_TOP;
      update_o   <= 1'b0;
      dec_o      <= 1'b0;
      rst_o      <= 1'b0;
      inc_o      <= 1'b0;
    end else begin
      update_o <= do_update;
      dec_o    <= do_update && c_dec;
      rst_o    <= do_update && c_rst;
      inc_o    <= do_update && c_inc;
      if (do_update) begin
        idx_q      <= next_idx;
        epc_q      <= epc_now;
        // A packet in the update cycle counts for the next period.
        rpc_q      <= pkt_rx_i ? CNT_W'(1) : '0;
        rssi_min_q <= pkt_rx_i ? pkt_rssi_i : RSSI_TOP;
      end else if (pkt_rx_i) begin
        if (rpc_q != '1) rpc_q <= rpc_q + 1'b1;
        if (pkt_rssi_i < rssi_min_q) rssi_min_q <= pkt_rssi_i;
      end
    end
  end

  assign cfg_o      = cfg_mem[idx_q];
  assign cfg_idx_o  = idx_q;
  assign rsens_o    = rsens_mem[idx_q];
  assign epc_o      = epc_q;
  assign rpc_o      = rpc_q;
  assign rssi_min_o = rssi_min_q;

endmodule
