// tb_adb_demod: end-to-end check of the adjustable baseband.
// An O-QPSK baseband signal is generated from random 4-bit symbols: the
// even chips of each IEEE 802.15.4 chip sequence are half-sine pulses on I,
// the odd chips on Q, Q delayed by half a chip, six samples per path chip,
// with uniform noise. Every baseband configuration (comparator on I and/or
// Q, each filter stage bypassed or not, under-sampling) must recover the
// symbols. Also checked: a symbol every 96 samples (250 kbit/s at 6 MS/s),
// the output two cycles after the decision sample of the last Q chip, the
// chip-error count with a clean signal, and a configuration change in the
// middle of a packet.
module tb_adb_demod;
  import rx_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0, sync = 0, vin = 0;
  adb_cfg_t cfg;
  logic signed [7:0] si = '0, sq = '0;
  logic sv;
  logic [3:0] sym;
  logic [5:0] cerr;
  int checks = 0, failures = 0;
  int cycle = 0;

  adb_demod dut (.clk(clk), .rst_n(rst_n), .cfg_i(cfg), .sync_i(sync), .in_valid_i(vin),
                 .i_i(si), .q_i(sq), .sym_valid_o(sv), .sym_o(sym), .chip_err_o(cerr));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got_sym [$], got_err [$], got_cyc [$];
  always @(posedge clk) if (sv) begin
    got_sym.push_back(sym);
    got_err.push_back(cerr);
    got_cyc.push_back(cycle);
  end

  // Send nsym random symbols; gaps inserts idle cycles between samples;
  // switch_at >= 0 changes the configuration to cfg2 at that sample.
  task automatic run(adb_cfg_t c, int nsym, int amp, int nz, bit gaps,
                     int switch_at, adb_cfg_t cfg2);
    int syms [];
    int L;
    int iv [], qv [];
    int cyc_of [];
    syms = new[nsym];
    L = 96 * nsym + 3;
    iv = new[L];
    qv = new[L];
    cyc_of = new[L];
    for (int t = 0; t < L; t++) begin iv[t] = 0; qv[t] = 0; end
    for (int n = 0; n < nsym; n++) begin
      syms[n] = $urandom_range(15, 0);
      for (int k = 0; k < 16; k++)
        for (int m = 0; m < 6; m++) begin
          iv[96*n + 6*k + m]     += (chip_of(syms[n], 2*k) ? 1 : -1) * amp * HALF_SINE[m] / 100;
          qv[96*n + 6*k + 3 + m] += (chip_of(syms[n], 2*k+1) ? 1 : -1) * amp * HALF_SINE[m] / 100;
        end
    end
    got_sym.delete(); got_err.delete(); got_cyc.delete();
    cfg = c;
    @(negedge clk);
    for (int t = 0; t < L; t++) begin
      if (t == switch_at) cfg = cfg2;
      si = sat8(iv[t] + noise(nz));
      sq = sat8(qv[t] + noise(nz));
      vin = 1;
      sync = (t == 0);
      @(negedge clk);
      cyc_of[t] = cycle;
      vin = 0; sync = 0;
      if (gaps && $urandom_range(2, 0) == 0) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    check(got_sym.size() == nsym, $sformatf("symbol count %0d of %0d", got_sym.size(), nsym));
    if (got_sym.size() == nsym) begin
      for (int n = 0; n < nsym; n++) begin
        check(got_sym[n] == syms[n], $sformatf("cfg %b symbol %0d: %0d vs %0d", c, n, got_sym[n], syms[n]));
        check(got_cyc[n] == cyc_of[96*(n+1) + 1] + 2,
              $sformatf("latency of symbol %0d: %0d", n, got_cyc[n] - cyc_of[96*(n+1) + 1]));
        if (nz == 0) check(got_err[n] == 0, "no chip errors on a clean signal");
        if (!gaps && n > 0) check(got_cyc[n] - got_cyc[n-1] == 96, "one symbol per 96 samples");
      end
    end
  endtask

  initial begin
    adb_cfg_t c;
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, 6, 100, 0, 0, -1, '0);
    for (int k = 0; k < 128; k++) begin
      c = adb_cfg_t'(7'(k));
      run(c, 3, 100, 25, k % 3 == 0, -1, '0);
    end
    c = '0;
    run(c, 8, 100, 20, 0, 96 * 3 + 40, adb_cfg_t'(7'b1111111));
    run(adb_cfg_t'(7'b1111111), 8, 100, 20, 1, 96 * 4 + 10, adb_cfg_t'(7'b0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
