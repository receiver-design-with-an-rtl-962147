// tb_acd_deinterleaver: writes one packet of random bits four at a time and
// checks that packet bit j is found in row j mod 16, column j div 16, that
// full rises exactly after the 124th write, that extra writes are dropped
// and that clear empties the buffer.
module tb_acd_deinterleaver;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0;
  logic [3:0]  wr_bits;
  logic [3:0]  rd_row;
  logic [30:0] rd_word;
  logic        full;
  logic        bits [496];
  int checks = 0, failures = 0;

  acd_deinterleaver dut (.clk(clk), .rst_n(rst_n), .clear_i(clear), .wr_en_i(wr_en),
                         .wr_bits_i(wr_bits), .rd_row_i(rd_row), .rd_word_o(rd_word), .full_o(full));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_bits = '0;
    rd_row  = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(!full, "empty after clear");
      for (int j = 0; j < 496; j++) bits[j] = 1'($urandom);
      for (int s = 0; s < 124; s++) begin
        check(!full, $sformatf("not full before write %0d", s));
        wr_en   = 1;
        wr_bits = {bits[4*s+3], bits[4*s+2], bits[4*s+1], bits[4*s]};
        @(negedge clk);
        wr_en = 0;
        if (s % 3 == 0) @(negedge clk);
      end
      check(full, "full after 124 writes");
      // A further write must change nothing.
      wr_en = 1; wr_bits = 4'hF;
      @(negedge clk);
      wr_en = 0;
      for (int r = 0; r < 16; r++) begin
        rd_row = 4'(r);
        #1;
        for (int c = 0; c < 31; c++)
          check(rd_word[c] == bits[c * 16 + r], $sformatf("pass %0d row %0d col %0d", pass, r, c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
