// tb_util_pkg: reference data and models shared by the receiver testbenches.
//
// Written independently of the RTL: the IEEE 802.15.4 chip table is listed
// in full (chip c0 leftmost) instead of being derived by rotation, the
// Hamming encoder derives its parity bits row by row, and the O-QPSK
// waveform generator produces half-sine shaped chips with noise.
package tb_util_pkg;

  // IEEE 802.15.4 2.4 GHz chip sequences, c0 ... c31 from left to right.
  localparam string PN_TABLE [16] = '{
    "11011001110000110101001000101110",
    "11101101100111000011010100100010",
    "00101110110110011100001101010010",
    "00100010111011011001110000110101",
    "01010010001011101101100111000011",
    "00110101001000101110110110011100",
    "11000011010100100010111011011001",
    "10011100001101010010001011101101",
    "10001100100101100000011101111011",
    "10111000110010010110000001110111",
    "01111011100011001001011000000111",
    "01110111101110001100100101100000",
    "00000111011110111000110010010110",
    "01100000011101111011100011001001",
    "10010110000001110111101110001100",
    "11001001011000000111011110111000"
  };

  // Chip i of symbol s (0 or 1).
  function automatic int chip_of(int s, int i);
    return (PN_TABLE[s][i] == "1") ? 1 : 0;
  endfunction

  // Half-sine chip shape over 6 samples, in percent of the amplitude:
  // round(100 * sin(pi * (m + 0.5) / 6)).
  localparam int HALF_SINE [6] = '{26, 71, 97, 97, 71, 26};

  // Parity-check column of Hamming (31,26) code-word bit p: data bits 0..25
  // take the numbers 3..31 that are not powers of two, in order; parity bit
  // 26+j takes 2**j.
  function automatic int ham_column(int p);
    int c;
    int n;
    if (p >= 26) return 1 << (p - 26);
    n = -1;
    c = 2;
    while (n < p) begin
      c++;
      if (c != 4 && c != 8 && c != 16) n++;
    end
    return c;
  endfunction

  // Systematic encoder: data in bits 0..25, parity j in bit 26+j set so that
  // every row of the parity-check matrix sums to zero.
  function automatic logic [30:0] ham_encode(logic [25:0] d);
    logic [30:0] cw;
    cw = {5'b0, d};
    for (int j = 0; j < 5; j++) begin
      logic par;
      par = 1'b0;
      for (int p = 0; p < 26; p++)
        if ((ham_column(p) >> j) & 1) par ^= d[p];
      cw[26 + j] = par;
    end
    return cw;
  endfunction

  // Uniform noise in [-a, a].
  function automatic int noise(int a);
    if (a == 0) return 0;
    return int'($urandom_range(2 * a, 0)) - a;
  endfunction

  // Saturate to a signed 8-bit ADC word.
  function automatic logic signed [7:0] sat8(int v);
    if (v > 127)  return 8'sd127;
    if (v < -128) return -8'sd128;
    return 8'(v);
  endfunction

endpackage
