// tb_acd_decoder: drives whole packets into the channel decoder.
// Coded packets: 416 random payload bits are Hamming (31,26) encoded into 16
// code words, interleaved column by column and cut into 124 four-bit
// symbols; burst errors (whole wrong symbols, and one 16-bit burst) are
// added. The payload stream must come out error free, the count of corrected
// code words must match, the first bit must leave two cycles after the last
// symbol is taken, and the 416 bits must leave in consecutive cycles.
// Uncoded packets: every symbol must come out as its four bits, bit 0 first.
module tb_acd_decoder;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0, coded = 0, pkt_start = 0, sym_valid = 0;
  logic [3:0] sym;
  logic dout_valid, dout, pkt_done, busy;
  logic [4:0] corr_cnt;
  int checks = 0, failures = 0;
  int cycle = 0;

  acd_decoder dut (.clk(clk), .rst_n(rst_n), .coded_i(coded), .pkt_start_i(pkt_start),
                   .sym_valid_i(sym_valid), .sym_i(sym), .dout_valid_o(dout_valid),
                   .dout_o(dout), .pkt_done_o(pkt_done), .corr_cnt_o(corr_cnt), .busy_o(busy));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Collected output.
  logic out_bits [$];
  int   out_cycles [$];
  int   done_seen = 0;
  always @(posedge clk) begin
    if (dout_valid) begin
      out_bits.push_back(dout);
      out_cycles.push_back(cycle);
    end
    if (pkt_done) done_seen++;
  end

  task automatic run_coded(int n_bad_syms, bit burst16);
    logic [25:0] pay [16];
    logic [30:0] cw [16];
    logic        tx [496];
    logic [3:0]  s;
    bit          hit [16];
    int          exp_corr, last_cycle;
    for (int r = 0; r < 16; r++) begin
      pay[r] = 26'($urandom);
      cw[r]  = ham_encode(pay[r]);
      hit[r] = 0;
    end
    for (int j = 0; j < 496; j++) tx[j] = cw[j % 16][j / 16];
    // Error bursts: whole symbols replaced (up to 4 bit errors each) at
    // positions far enough apart to hit distinct code words.
    for (int e = 0; e < n_bad_syms; e++) begin
      int sp;
      sp = 9 * e + 1;   // symbols 1, 10, 19, 28 hit disjoint row groups
      for (int k = 0; k < 4; k++) begin
        tx[4 * sp + k] = ~tx[4 * sp + k];
        hit[(4 * sp + k) % 16] = 1;
      end
    end
    if (burst16) begin
      for (int k = 0; k < 16; k++) begin
        tx[300 + k] = ~tx[300 + k];
        hit[(300 + k) % 16] = 1;
      end
    end
    exp_corr = 0;
    for (int r = 0; r < 16; r++) exp_corr += hit[r];
    out_bits.delete();
    out_cycles.delete();
    done_seen = 0;
    @(negedge clk);
    coded = 1;
    pkt_start = 1;
    @(negedge clk);
    pkt_start = 0;
    for (int i = 0; i < 124; i++) begin
      s = {tx[4*i+3], tx[4*i+2], tx[4*i+1], tx[4*i]};
      sym = s;
      sym_valid = 1;
      @(negedge clk);
      last_cycle = cycle;   // the posedge that took this symbol
      sym_valid = 0;
      repeat ($urandom_range(7, 0)) @(negedge clk);
    end
    repeat (450) @(negedge clk);
    check(out_bits.size() == 416, $sformatf("coded bit count %0d", out_bits.size()));
    if (out_bits.size() == 416) begin
      for (int b = 0; b < 416; b++)
        check(out_bits[b] == pay[b / 26][b % 26], $sformatf("coded bit %0d", b));
      check(out_cycles[0] == last_cycle + 2, $sformatf("first bit latency %0d", out_cycles[0] - last_cycle));
      check(out_cycles[415] == out_cycles[0] + 415, "416 bits in consecutive cycles");
    end
    check(done_seen == 1, "one pkt_done");
    check(32'(corr_cnt) == exp_corr, $sformatf("corrected words %0d expected %0d", corr_cnt, exp_corr));
  endtask

  task automatic run_uncoded(int n);
    logic [3:0] syms [$];
    out_bits.delete();
    @(negedge clk);
    coded = 0;
    pkt_start = 1;
    @(negedge clk);
    pkt_start = 0;
    for (int i = 0; i < n; i++) begin
      sym = 4'($urandom);
      syms.push_back(sym);
      sym_valid = 1;
      @(negedge clk);
      sym_valid = 0;
      repeat ($urandom_range(10, 3)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(out_bits.size() == 4 * n, "uncoded bit count");
    if (out_bits.size() == 4 * n)
      for (int b = 0; b < 4 * n; b++)
        check(out_bits[b] == syms[b / 4][b % 4], $sformatf("uncoded bit %0d", b));
  endtask

  initial begin
    sym = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_coded(0, 0);
    run_coded(1, 0);
    run_coded(3, 0);
    run_coded(0, 1);
    run_uncoded(30);
    run_coded(4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
