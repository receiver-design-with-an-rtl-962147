// acd_deinterleaver: linear block deinterleaver for the coded packet.
//
// At the transmitter the 16 code words of a packet (31 bits each) are the
// rows of a 16 x 31 matrix that is sent column by column, so that a burst
// of up to 16 consecutive bit errors hits each code word at most once.
// Here the received bits are written back column by column: packet bit j
// goes to row j mod 16, column j div 16. Bits arrive four at a time (one
// DSSS symbol, bit 0 first); since 16 is a multiple of 4, the four bits of
// one symbol land in four consecutive rows of the same column.
//
// Interface: clear_i empties the buffer (write pointer to 0). wr_en_i with
// wr_bits_i writes the next four bits; writes beyond 496 bits are dropped.
// full_o is set once all 31 x 16 bits are in. rd_row_i selects a code word,
// rd_word_o returns it combinationally.
// Timing: one write per cycle; the write pointer and full_o update on the
// clock edge that takes the write.
// That the interleaver is a linear block interleaver over 16 code words
// follows the design description; the row/column orientation is this
// design's own choice.
module acd_deinterleaver
  import rx_pkg::*;
#(
  parameter int unsigned ROWS = CW_PER_PKT,
  parameter int unsigned COLS = HAM_N
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear_i,
  input  logic                    wr_en_i,
  input  logic [SYM_BITS-1:0]     wr_bits_i,
  input  logic [$clog2(ROWS)-1:0] rd_row_i,
  output logic [COLS-1:0]         rd_word_o,
  output logic                    full_o
);

  localparam int unsigned TOTAL = ROWS * COLS;
  localparam int unsigned PTR_W = $clog2(TOTAL + 1);

  logic [COLS-1:0] mem [ROWS];
  logic [PTR_W-1:0] wptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      for (int r = 0; r < ROWS; r++) mem[r] <= '0;
    end else if (clear_i) begin
      wptr <= '0;
    end else if (wr_en_i && (wptr < PTR_W'(TOTAL))) begin
      for (int k = 0; k < SYM_BITS; k++) begin
        if (32'(wptr) + 32'(k) < TOTAL)
          mem[(32'(wptr) + 32'(k)) % ROWS][(32'(wptr) + 32'(k)) / ROWS] <= wr_bits_i[k];
      end
      wptr <= (32'(wptr) + SYM_BITS > TOTAL) ? PTR_W'(TOTAL) : wptr + PTR_W'(SYM_BITS);
    end
  end

  assign rd_word_o = mem[rd_row_i];
  assign full_o    = (wptr == PTR_W'(TOTAL));

endmodule
