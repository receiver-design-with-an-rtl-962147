// tb_adb_path: checks one baseband path under every configuration.
// Part 1 drives random samples and compares each chip decision with an
// integer model of comparator, the two moving-sum filter stages and
// under-sampling, decided at sample 4 of each six-sample chip. Part 2 drives
// noisy half-sine chips and checks that every configuration recovers the
// sent chips. The decision must appear one cycle after the decision sample.
module tb_adb_path;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, cmp = 0, us = 0, vin = 0, cend = 0;
  logic [1:0] byp = '0;
  logic signed [7:0] din = '0;
  logic cv, chip;
  int checks = 0, failures = 0;

  adb_path #(.W(8)) dut (.clk(clk), .rst_n(rst_n), .clear_i(clear), .cmp_i(cmp), .byp_i(byp),
                         .undersample_i(us), .in_valid_i(vin), .in_i(din), .decide_i(cend),
                         .chip_valid_o(cv), .chip_o(chip));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model state.
  int m_d1, m_d2, m_ylast, m_phase;

  // Drive one sample; returns the model decision when the window ends.
  task automatic drive(int s, bit first, bit last, output int exp_dec);
    int x0, y1, y2;
    if (first) begin m_d1 = 0; m_d2 = 0; m_ylast = 0; m_phase = 0; end
    x0 = cmp ? (s < 0 ? -1 : 1) : s;
    exp_dec = -1;
    if (!us || m_phase == 0) begin
      y1 = byp[0] ? x0 : x0 + m_d1;
      y2 = byp[1] ? y1 : y1 + m_d2;
      m_d1 = x0;
      m_d2 = y1;
      m_ylast = y2;
    end
    m_phase ^= 1;
    if (last) exp_dec = (m_ylast >= 0) ? 1 : 0;
    din = 8'(s);
    vin = 1;
    clear = first;
    cend = last;
    @(negedge clk);
    vin = 0; clear = 0; cend = 0;
    if (last) begin
      check(cv, "decision one cycle after the decision sample");
      check(int'(chip) == exp_dec, $sformatf("decision cfg cmp=%0d byp=%0d us=%0d", cmp, byp, us));
    end else begin
      check(!cv, "no decision on other samples");
    end
    if ($urandom_range(3, 0) == 0) @(negedge clk);   // idle gap
  endtask

  initial begin
    int d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Part 1: random samples.
    for (int cfg = 0; cfg < 16; cfg++) begin
      {cmp, us, byp} = 4'(cfg);
      for (int c = 0; c < 40; c++)
        for (int k = 0; k < 6; k++)
          drive(int'($urandom_range(255, 0)) - 128, c == 0 && k == 0, k == 4, d);
    end
    // Part 2: noisy half-sine chips.
    for (int cfg = 0; cfg < 16; cfg++) begin
      {cmp, us, byp} = 4'(cfg);
      for (int c = 0; c < 40; c++) begin
        int bitv;
        bitv = $urandom_range(1, 0);
        for (int k = 0; k < 6; k++) begin
          drive(int'(sat8((bitv ? 1 : -1) * HALF_SINE[k] * 100 / 100 + noise(10))),
                c == 0 && k == 0, k == 4, d);
          if (k == 4) check(d == bitv, "model recovers the clean chip");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
