// rx_pkg: types and constants shared by the adjustable receiver.
//
// The receiver is a chain of an adjustable digital baseband (ADB, an IEEE
// 802.15.4 O-QPSK/DSSS demodulator), an adjustable channel decoder (ACD,
// block deinterleaver plus Hamming (31,26) decoder, or a plain bypass) and a
// configurator that picks one configuration out of a Pareto table.
//
// What follows the design description: the 8-bit ADC word, the 32-chip /
// 4-bit DSSS symbol of IEEE 802.15.4, 16 Hamming (31,26) code words per
// packet, the ADB knobs (comparator on I and/or Q, two bypassable filter
// stages per path, under-sampling) and the 13 front-end settings.
// What is this design's own choice: the bit layout of the configuration
// word, the code-word bit layout and the 6 samples per path chip, which is
// 6 MS/s divided by the 1 Mchip/s that each of the I and Q paths carries.
package rx_pkg;

  // ADC word width (8-bit SAR converter).
  localparam int unsigned ADC_W = 8;

  // IEEE 802.15.4 2.4 GHz O-QPSK PHY: 4-bit symbols spread to 32 chips.
  localparam int unsigned SYM_BITS      = 4;
  localparam int unsigned CHIPS_PER_SYM = 32;
  localparam int unsigned CHIPS_PER_PATH = CHIPS_PER_SYM / 2;  // even chips on I, odd on Q

  // Samples per chip on one path: 6 MS/s over 1 Mchip/s per path.
  localparam int unsigned SAMPLES_PER_CHIP = 6;

  // Hamming (31,26) code, 16 interleaved code words per packet.
  localparam int unsigned HAM_M      = 5;
  localparam int unsigned HAM_N      = 31;
  localparam int unsigned HAM_K      = 26;
  localparam int unsigned CW_PER_PKT = 16;

  // Front-end (AAF) settings; the names are those of the front end's
  // configuration points: LNA bypassed (LB) or LNA gain (L9..L18), large (LM)
  // or small (SM) mixer switch, matching strategy 1 or 2.
  typedef enum logic [3:0] {
    AAF_LB_LM1  = 4'd0,
    AAF_LB_LM2  = 4'd1,
    AAF_LB_SM1  = 4'd2,
    AAF_LB_SM2  = 4'd3,
    AAF_L9_SM1  = 4'd4,
    AAF_L9_SM2  = 4'd5,
    AAF_L12_SM1 = 4'd6,
    AAF_L12_SM2 = 4'd7,
    AAF_L15_SM1 = 4'd8,
    AAF_L15_SM2 = 4'd9,
    AAF_L17_SM1 = 4'd10,
    AAF_L17_SM2 = 4'd11,
    AAF_L18_LM1 = 4'd12
  } aaf_cfg_e;

  // Baseband (ADB) configuration. cmp_* enables the 1-bit comparator on a
  // path (CI, CQ, CIQ; both clear is CB). byp_* bypasses filter stage 1
  // (bit 0) and stage 2 (bit 1) of a path (all clear is FA). undersample
  // drops every other sample on both paths.
  typedef struct packed {
    logic       cmp_i;
    logic       cmp_q;
    logic [1:0] byp_i;
    logic [1:0] byp_q;
    logic       undersample;
  } adb_cfg_t;

  // One system-level configuration c = (C_aaf, C_adb, C_acd).
  typedef struct packed {
    aaf_cfg_e aaf;
    adb_cfg_t adb;
    logic     coded;   // C_acd: 1 = Hamming-coded packets, 0 = uncoded
  } rx_cfg_t;

  // IEEE 802.15.4 chip sequence of symbol 0; bit i is chip ci, so the
  // literal lists c31 first and c0 last (c0..c31 = 1101 1001 1100 0011
  // 0101 0010 0010 1110).
  localparam logic [31:0] PN_SYM0 = 32'b01110100010010101100001110011011;

  // Chip sequence of symbol s, index i = chip ci. Symbols 1..7 are symbol 0
  // rotated right by 4*s chips; symbols 8..15 are symbols 0..7 with every
  // odd-indexed chip inverted.
  function automatic logic [31:0] pn_seq(input logic [3:0] s);
    logic [31:0] q;
    for (int i = 0; i < 32; i++) begin
      q[i] = PN_SYM0[(i - 4 * int'(s[2:0]) + 32) % 32];
      if (s[3] && (i % 2 == 1)) q[i] = ~q[i];
    end
    return q;
  endfunction

  // Column of the Hamming (31,26) parity-check matrix for code-word bit p.
  // Bits 26..30 are the parity bits (unit columns 1,2,4,8,16); bits 0..25
  // carry the data, with the 26 non-power-of-two columns 3,5,6,7,9,... in
  // ascending order.
  function automatic logic [HAM_M-1:0] ham_col(input int p);
    int n;
    logic [HAM_M-1:0] v;
    v = '0;
    if (p >= HAM_K) begin
      v = HAM_M'(1 << (p - HAM_K));
    end else begin
      n = 0;
      for (int c = 3; c < 32; c++) begin
        if ((c & (c - 1)) != 0) begin
          if (n == p) v = HAM_M'(c);
          n++;
        end
      end
    end
    return v;
  endfunction

endpackage
