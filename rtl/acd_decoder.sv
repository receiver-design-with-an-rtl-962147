// acd_decoder: adjustable channel decoder (coded / uncoded).
//
// In uncoded mode (coded_i = 0) every 4-bit DSSS symbol from the baseband is
// passed on as four payload bits, bit 0 first. In coded mode the symbols of
// one packet fill a 16 x 31 block deinterleaver (16 Hamming (31,26) code
// words, 496 bits = 62 bytes on air, 416 payload bits); once it is full the
// code words are read row by row, each is corrected by a Hamming (31,26)
// decoder and its 26 payload bits are sent out, bit 0 first.
//
// Interface: pkt_start_i marks the start of a packet's payload and clears
// the deinterleaver (it may come in the same cycle as the first symbol).
// sym_valid_i / sym_i carry the symbols. dout_valid_o / dout_o is the bit
// stream. pkt_done_o pulses after the last payload bit of a coded packet,
// corr_cnt_o then holds how many code words of the packet needed a
// correction (the decoder's signal-quality indication). busy_o is high while
// bits are being shifted out.
// Timing: one output bit per clock. Uncoded: the four bits of a symbol leave
// in the four cycles after it arrives; symbols must be at least four cycles
// apart (at the 6 MHz sample clock they are 96 cycles apart). Coded: the
// first bit is taken by the second clock edge after the one that takes the
// 124th symbol; the packet's 416 bits follow in 416 consecutive cycles.
// The code, the 16 code words per packet and the interleaver follow the
// design description; the bit order and the handshake are this design's own.
module acd_decoder
  import rx_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                coded_i,
  input  logic                pkt_start_i,
  input  logic                sym_valid_i,
  input  logic [SYM_BITS-1:0] sym_i,
  output logic                dout_valid_o,
  output logic                dout_o,
  output logic                pkt_done_o,
  output logic [4:0]          corr_cnt_o,
  output logic                busy_o
);

  typedef enum logic [1:0] {S_FILL, S_DRAIN, S_DONE} state_e;

  state_e state;
  logic [$clog2(CW_PER_PKT)-1:0] row;
  logic [$clog2(HAM_K)-1:0]      bitpos;
  logic [HAM_N-1:0]              rd_word;
  logic [HAM_K-1:0]              data;
  logic                          corrected;
  logic                          full;
  logic [HAM_K-1:0]              shreg;
  logic [2:0]                    unc_left;
  logic [SYM_BITS-1:0]           unc_sh;

  acd_deinterleaver u_dil (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear_i   (pkt_start_i),
    .wr_en_i   (sym_valid_i && coded_i && state == S_FILL),
    .wr_bits_i (sym_i),
    .rd_row_i  (row),
    .rd_word_o (rd_word),
    .full_o    (full)
  );

  hamming_31_26_dec u_ham (
    .cw_i        (rd_word),
    .data_o      (data),
    .syndrome_o  (),
    .corrected_o (corrected)
  );

  // Coded path: fill, then drain code word by code word. At bit position 0
  // of a row the corrected word comes straight from the decoder; its other
  // 25 bits are shifted out of shreg.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_FILL;
      row        <= '0;
      bitpos     <= '0;
      shreg      <= '0;
      corr_cnt_o <= '0;
      pkt_done_o <= 1'b0;
    end else begin
      pkt_done_o <= 1'b0;
      if (pkt_start_i) begin
        state      <= S_FILL;
        row        <= '0;
        bitpos     <= '0;
        corr_cnt_o <= '0;
      end else begin
        unique case (state)
          S_FILL: if (full && coded_i) begin
            state  <= S_DRAIN;
            row    <= '0;
            bitpos <= '0;
          end
          S_DRAIN: begin
            if (bitpos == '0) begin
              shreg <= data >> 1;
              if (corrected) corr_cnt_o <= corr_cnt_o + 1'b1;
            end else begin
              shreg <= shreg >> 1;
            end
            if (32'(bitpos) == HAM_K - 1) begin
              bitpos <= '0;
              if (32'(row) == CW_PER_PKT - 1) begin
                state      <= S_DONE;
                pkt_done_o <= 1'b1;
              end else begin
                row <= row + 1'b1;
              end
            end else begin
              bitpos <= bitpos + 1'b1;
            end
          end
          S_DONE: ;
          default: state <= S_FILL;
        endcase
      end
    end
  end

  logic coded_bit;
  assign coded_bit = (bitpos == '0) ? data[0] : shreg[0];

  // Uncoded path: serialise each symbol.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unc_left <= '0;
      unc_sh   <= '0;
    end else if (pkt_start_i && !(sym_valid_i && !coded_i)) begin
      unc_left <= '0;
    end else if (sym_valid_i && !coded_i) begin
      unc_left <= 3'(SYM_BITS);
      unc_sh   <= sym_i;
    end else if (unc_left != '0) begin
      unc_left <= unc_left - 1'b1;
      unc_sh   <= unc_sh >> 1;
    end
  end

  always_comb begin
    dout_valid_o = 1'b0;
    dout_o       = 1'b0;
    if (state == S_DRAIN) begin
      dout_valid_o = 1'b1;
      dout_o       = coded_bit;
    end else if (unc_left != '0) begin
      dout_valid_o = 1'b1;
      dout_o       = unc_sh[0];
    end
  end

  assign busy_o = (state == S_DRAIN) || (unc_left != '0);

endmodule
