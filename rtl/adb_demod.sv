// adb_demod: adjustable digital baseband, IEEE 802.15.4 O-QPSK/DSSS.
//
// The O-QPSK signal carries the even chips of each 32-chip symbol on the
// in-phase (I) path and the odd chips on the quadrature (Q) path, Q offset
// by half an I chip. Two parallel adb_path instances turn the 6 MS/s I and
// Q sample streams into hard chip decisions; a dsss_despreader maps the 32
// chips of a symbol to the 4-bit symbol. The configuration cfg_i (see
// rx_pkg::adb_cfg_t) switches the comparator of each path, bypasses filter
// stages per path, and turns on under-sampling; it may change at any time,
// and takes effect from the next sample on.
//
// Chip timing: the stream is assumed to be chip-aligned. sync_i, given with
// the first payload sample, starts the symbol grid: I chip k of a symbol
// covers samples 6k..6k+5, Q chip k covers samples 6k+3..6k+8 (its last Q
// chip runs 3 samples into the next symbol). Each chip is decided at its
// sample 4 (where a half-sine chip and the filters' three-sample window
// 4, 3, 2 line up): I chip k at sample 6k+4, Q chip k at sample 6k+7.
// Preamble search, SFD detection and chip-timing recovery are not part of
// this block.
//
// Interface: in_valid_i with i_i / q_i (signed ADC words, one pair per
// sample clock). sym_valid_o pulses with sym_o and chip_err_o (chips that
// differ from the chosen sequence: the baseband's quality indication).
// Timing: a symbol is complete with the decision sample of its last Q chip
// (sample 1 of the next symbol); sym_valid_o follows two cycles after that
// sample. One symbol per 96 samples, i.e. 250 kbit/s at 6 MS/s.
// What is the design description's: the IEEE 802.15.4 demodulation, the
// two paths, the knobs. What is this design's own: the path internals, the
// fixed symbol grid and the hard-decision despreading.
module adb_demod
  import rx_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  adb_cfg_t                cfg_i,
  input  logic                    sync_i,
  input  logic                    in_valid_i,
  input  logic signed [ADC_W-1:0] i_i,
  input  logic signed [ADC_W-1:0] q_i,
  output logic                    sym_valid_o,
  output logic [SYM_BITS-1:0]     sym_o,
  output logic [5:0]              chip_err_o
);

  localparam int unsigned SPC = SAMPLES_PER_CHIP;
  localparam int unsigned SPS = SPC * CHIPS_PER_PATH;   // samples per symbol
  localparam int unsigned CNT_W = $clog2(SPS);
  localparam int unsigned IDX_W = $clog2(CHIPS_PER_PATH);
  localparam int unsigned OFS   = SPC / 2;       // Q offset, samples
  localparam int unsigned DEC   = SPC * 2 / 3;   // decision sample in a chip

  logic [CNT_W-1:0] cnt_q, cnt;
  logic             first_q, first;
  logic             i_end, q_end;
  logic [IDX_W-1:0] i_idx, q_idx, i_idx_q, q_idx_q;
  logic             q_skip_q;
  logic             i_cv, i_chip, q_cv, q_chip;
  logic [CHIPS_PER_SYM-1:0] chips_q, chips_full;
  logic             sym_done;

  assign cnt   = sync_i ? '0 : cnt_q;
  assign first = sync_i ? 1'b1 : first_q;
  // Decision samples: sample DEC of each I chip window, and of each Q chip
  // window (offset by OFS); the last Q decision of a symbol falls into the
  // next symbol.
  assign i_end = (32'(cnt) % SPC) == DEC;
  assign q_end = (32'(cnt) % SPC) == (OFS + DEC) % SPC;
  assign i_idx = IDX_W'(32'(cnt) / SPC);
  assign q_idx = (32'(cnt) < OFS + DEC) ? IDX_W'(CHIPS_PER_PATH - 1)
                                        : IDX_W'((32'(cnt) - OFS - DEC) / SPC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      first_q  <= 1'b1;
      i_idx_q  <= '0;
      q_idx_q  <= '0;
      q_skip_q <= 1'b0;
    end else if (in_valid_i) begin
      cnt_q    <= (32'(cnt) == SPS - 1) ? '0 : cnt + 1'b1;
      if (32'(cnt) == SPS - 1) first_q <= 1'b0;
      else if (sync_i)         first_q <= 1'b1;
      i_idx_q  <= i_idx;
      q_idx_q  <= q_idx;
      q_skip_q <= first && (32'(cnt) < OFS + DEC);
    end else if (sync_i) begin
      cnt_q   <= '0;
      first_q <= 1'b1;
    end
  end

  adb_path #(.W(ADC_W)) u_path_i (
    .clk           (clk),
    .rst_n         (rst_n),
    .clear_i       (sync_i),
    .cmp_i         (cfg_i.cmp_i),
    .byp_i         (cfg_i.byp_i),
    .undersample_i (cfg_i.undersample),
    .in_valid_i    (in_valid_i),
    .in_i          (i_i),
    .decide_i      (i_end),
    .chip_valid_o  (i_cv),
    .chip_o        (i_chip)
  );

  adb_path #(.W(ADC_W)) u_path_q (
    .clk           (clk),
    .rst_n         (rst_n),
    .clear_i       (sync_i),
    .cmp_i         (cfg_i.cmp_q),
    .byp_i         (cfg_i.byp_q),
    .undersample_i (cfg_i.undersample),
    .in_valid_i    (in_valid_i),
    .in_i          (q_i),
    .decide_i      (q_end),
    .chip_valid_o  (q_cv),
    .chip_o        (q_chip)
  );

  // Collect chips; the symbol is complete with its last Q chip.
  always_comb begin
    chips_full = chips_q;
    if (i_cv) chips_full[2 * i_idx_q] = i_chip;
    if (q_cv && !q_skip_q) chips_full[2 * q_idx_q + 1] = q_chip;
  end
  assign sym_done = q_cv && !q_skip_q && (32'(q_idx_q) == CHIPS_PER_PATH - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chips_q <= '0;
    else        chips_q <= chips_full;
  end

  dsss_despreader u_desp (
    .clk           (clk),
    .rst_n         (rst_n),
    .chips_valid_i (sym_done),
    .chips_i       (chips_full),
    .sym_valid_o   (sym_valid_o),
    .sym_o         (sym_o),
    .chip_err_o    (chip_err_o)
  );

endmodule
