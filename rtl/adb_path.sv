// adb_path: one computational path (I or Q) of the adjustable baseband.
//
// Each sample of the path passes a bypassable 1-bit comparator and then two
// sequential bypassable filter stages; once per chip, at the decision
// sample, the sign of the filter output is the hard chip decision.
//  - comparator (cmp_i = 1): the sample is replaced by +1 or -1 by its sign,
//    cutting the word width of everything behind it to 2 bits;
//  - filter stage k (byp_i[k-1] = 0): y[n] = x[n] + x[n-1], a two-tap
//    moving sum (low pass); when bypassed the stage passes x[n]. With both
//    stages on, the decision sees x[n] + 2x[n-1] + x[n-2], three samples
//    of the chip; with both bypassed it sees one sample;
//  - under-sampling (undersample_i = 1): every other sample is dropped; the
//    filters run on the kept samples only, and a decision that falls on a
//    dropped sample uses the output of the last kept one.
// Turning on the comparator, bypassing filter stages or under-sampling
// lowers the switching activity (power) and the noise robustness.
//
// The knobs (comparator, two sequential bypassable filter stages, dropping
// every other sample) follow the design description; what each filter
// computes and the one-sample-per-chip decision are this design's own,
// simplest choice.
//
// Interface: clear_i restarts the path (filter memories and the
// under-sampling phase); given with a sample it takes effect for that
// sample. in_valid_i / in_i is the sample stream; decide_i marks the
// decision sample of a chip (given with in_valid_i). chip_valid_o pulses
// with chip_o (1 = positive chip) one cycle later.
// Timing: one sample per cycle at most; decision latency one cycle.
module adb_path
  import rx_pkg::*;
#(
  parameter int unsigned W = ADC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear_i,
  input  logic                cmp_i,
  input  logic [1:0]          byp_i,
  input  logic                undersample_i,
  input  logic                in_valid_i,
  input  logic signed [W-1:0] in_i,
  input  logic                decide_i,
  output logic                chip_valid_o,
  output logic                chip_o
);

  logic signed [W-1:0] x0, d1_q, d1;
  logic signed [W:0]   y1, d2_q, d2;
  logic signed [W+1:0] y2, ylast_q, ylast, ydec;
  logic                keep, phase_q, phase;

  // A clear given with a sample starts the path at that sample.
  assign d1    = clear_i ? '0 : d1_q;
  assign d2    = clear_i ? '0 : d2_q;
  assign ylast = clear_i ? '0 : ylast_q;
  assign phase = clear_i ? 1'b0 : phase_q;

  // Comparator: sign to +1 / -1.
  assign x0 = !cmp_i ? in_i : (in_i[W-1] ? -W'(1) : W'(1));

  // Filter stages.
  assign y1 = byp_i[0] ? (W+1)'(x0) : (W+1)'(x0) + (W+1)'(d1);
  assign y2 = byp_i[1] ? (W+2)'(y1) : (W+2)'(y1) + (W+2)'(d2);

  // Under-sampling keeps the samples of even phase only.
  assign keep = !undersample_i || !phase;
  assign ydec = keep ? y2 : ylast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_q         <= '0;
      d2_q         <= '0;
      ylast_q      <= '0;
      phase_q      <= 1'b0;
      chip_valid_o <= 1'b0;
      chip_o       <= 1'b0;
    end else begin
      chip_valid_o <= 1'b0;
      if (in_valid_i) begin
        phase_q <= ~phase;
        if (keep) begin
          d1_q    <= x0;
          d2_q    <= y1;
          ylast_q <= y2;
        end else begin
          d1_q    <= d1;
          d2_q    <= d2;
          ylast_q <= ylast;
        end
        if (decide_i) begin
          chip_valid_o <= 1'b1;
          chip_o       <= !ydec[W+1];
        end
      end else if (clear_i) begin
        d1_q    <= '0;
        d2_q    <= '0;
        ylast_q <= '0;
        phase_q <= 1'b0;
      end
    end
  end

endmodule
