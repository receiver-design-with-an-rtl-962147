// hamming_31_26_dec: single-error-correcting Hamming (31,26) decoder.
//
// The channel decoder of the receiver uses a systematic Hamming code with
// five parity bits per 31-bit code word (26 payload bits, code rate 26/31).
// The decoder forms the 5-bit syndrome as the XOR of the parity-check
// columns of all set code-word bits; a non-zero syndrome names the one bit
// to flip. Double errors are not detectable apart from single ones (minimum
// distance 3) and are miscorrected, as with any Hamming decoder.
//
// Interface: cw_i is the received code word, data bits in [25:0] and parity
// bits in [30:26] (see rx_pkg::ham_col for the column assignment, which is
// this design's own choice). data_o is the corrected payload, syndrome_o the
// syndrome and corrected_o is set when a bit was flipped.
// Timing: purely combinational.
module hamming_31_26_dec
  import rx_pkg::*;
(
  input  logic [HAM_N-1:0] cw_i,
  output logic [HAM_K-1:0] data_o,
  output logic [HAM_M-1:0] syndrome_o,
  output logic             corrected_o
);

  always_comb begin
    logic [HAM_M-1:0] syn;
    logic [HAM_N-1:0] fixed;
    syn = '0;
    for (int p = 0; p < HAM_N; p++)
      if (cw_i[p]) syn ^= ham_col(p);
    fixed = cw_i;
    for (int p = 0; p < HAM_N; p++)
      if (syn == ham_col(p)) fixed[p] = ~fixed[p];
    syndrome_o  = syn;
    corrected_o = (syn != '0);
    data_o      = fixed[HAM_K-1:0];
  end

endmodule
