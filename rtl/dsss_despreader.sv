// dsss_despreader: IEEE 802.15.4 DSSS symbol decision.
//
// The 32 hard chip decisions of one symbol are compared with the 16 chip
// sequences of the IEEE 802.15.4 2.4 GHz O-QPSK PHY; the symbol whose
// sequence differs in the fewest chips is taken (maximum correlation of
// hard chips). On a tie the lower symbol value wins. The number of chips
// that differ from the chosen sequence is given out as a per-symbol signal
// quality indication.
//
// Interface: chips_valid_i / chips_i (index i = chip ci, c0 first).
// sym_valid_o pulses with sym_o and chip_err_o.
// Timing: one symbol per cycle at most, registered output one cycle after
// the input.
// The demodulation scheme (IEEE 802.15.4 DSSS) follows the design
// description; the hard-decision minimum-distance search is this design's
// own, simplest choice.
module dsss_despreader
  import rx_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       chips_valid_i,
  input  logic [CHIPS_PER_SYM-1:0]   chips_i,
  output logic                       sym_valid_o,
  output logic [SYM_BITS-1:0]        sym_o,
  output logic [5:0]                 chip_err_o
);

  logic [SYM_BITS-1:0] best_sym;
  logic [5:0]          best_dist;

  always_comb begin
    logic [5:0] d;
    best_sym  = '0;
    best_dist = 6'd63;
    for (int s = 0; s < 16; s++) begin
      d = 6'($countones(chips_i ^ pn_seq(4'(s))));
      if (d < best_dist) begin
        best_dist = d;
        best_sym  = 4'(s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_valid_o <= 1'b0;
      sym_o       <= '0;
      chip_err_o  <= '0;
    end else begin
      sym_valid_o <= chips_valid_i;
      if (chips_valid_i) begin
        sym_o      <= best_sym;
        chip_err_o <= best_dist;
      end
    end
  end

endmodule
