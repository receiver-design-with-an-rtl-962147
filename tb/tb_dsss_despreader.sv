// tb_dsss_despreader: feeds the 16 IEEE 802.15.4 chip sequences with up to
// five chips inverted and checks the symbol, the count of differing chips
// and the one-cycle output latency.
module tb_dsss_despreader;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0, cv = 0;
  logic [31:0] chips;
  logic sv;
  logic [3:0] sym;
  logic [5:0] err;
  int checks = 0, failures = 0;

  dsss_despreader dut (.clk(clk), .rst_n(rst_n), .chips_valid_i(cv), .chips_i(chips),
                       .sym_valid_o(sv), .sym_o(sym), .chip_err_o(err));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nerr, pos [5];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int s;
      s = t % 16;
      for (int i = 0; i < 32; i++) chips[i] = 1'(chip_of(s, i));
      // Up to 5 distinct errors (the sequences are at least 12 chips apart).
      nerr = t < 16 ? 0 : int'($urandom_range(5, 0));
      for (int e = 0; e < nerr; e++) begin
        bit dup;
        do begin
          pos[e] = $urandom_range(31, 0);
          dup = 0;
          for (int f = 0; f < e; f++) if (pos[f] == pos[e]) dup = 1;
        end while (dup);
        chips[pos[e]] = ~chips[pos[e]];
      end
      cv = 1;
      @(negedge clk);
      cv = 0;
      check(sv, "valid one cycle after input");
      check(32'(sym) == s, $sformatf("symbol %0d got %0d (%0d errors)", s, sym, nerr));
      check(32'(err) == nerr, $sformatf("chip errors %0d got %0d", nerr, err));
      @(negedge clk);
      check(!sv, "single-cycle valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
