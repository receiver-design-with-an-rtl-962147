// tb_workload_adb_snr: noise robustness of the baseband configurations.
// The baseband settings named CB,FA; CI,FA; CIQ,FA; CI,FQ1; CB,FIQ1;
// CI,FIQ1; CIQ,FIQ1 and CIQ,FIQ3 (comparators on I and/or Q, filter stages
// bypassed) are each run on the same O-QPSK symbol stream with
// near-Gaussian noise (sum of four uniform variables) at several noise
// levels. The symbol error count per setting is printed. Checked: with a
// clean signal every setting is error free, and the full-effort setting
// CB,FA makes fewer symbol errors than the lowest-effort setting CIQ,FIQ3,
// i.e. the settings do trade robustness for effort.
module tb_workload_adb_snr;
  import rx_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0, sync = 0, vin = 0;
  adb_cfg_t cfg;
  logic signed [7:0] si = '0, sq = '0;
  logic sv;
  logic [3:0] sym;
  logic [5:0] cerr;
  int checks = 0, failures = 0;

  adb_demod dut (.clk(clk), .rst_n(rst_n), .cfg_i(cfg), .sync_i(sync), .in_valid_i(vin),
                 .i_i(si), .q_i(sq), .sym_valid_o(sv), .sym_o(sym), .chip_err_o(cerr));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got [$];
  always @(posedge clk) if (sv) got.push_back(sym);

  localparam int NC = 8;
  localparam string NAME [NC] = '{"CB,FA", "CI,FA", "CIQ,FA", "CI,FQ1", "CB,FIQ1",
                                  "CI,FIQ1", "CIQ,FIQ1", "CIQ,FIQ3"};
  function automatic adb_cfg_t setting(int k);
    adb_cfg_t c;
    c = '0;
    case (k)
      1: c.cmp_i = 1;
      2: begin c.cmp_i = 1; c.cmp_q = 1; end
      3: begin c.cmp_i = 1; c.byp_q = 2'b10; end
      4: begin c.byp_i = 2'b10; end
      5: begin c.cmp_i = 1; c.byp_i = 2'b10; end
      6: begin c.cmp_i = 1; c.cmp_q = 1; c.byp_i = 2'b10; end
      7: begin c.cmp_i = 1; c.cmp_q = 1; c.byp_i = 2'b11; c.byp_q = 2'b10; end
      default: ;
    endcase
    return c;
  endfunction

  localparam int NSYM = 150;
  localparam int NL = 3;
  localparam int LEVEL [NL] = '{0, 150, 220};

  initial begin
    int syms [NSYM];
    int iv [], qv [], ni [], nq [];
    int L, errs [NL][NC];
    L = 96 * NSYM + 3;
    iv = new[L]; qv = new[L]; ni = new[L]; nq = new[L];
    for (int t = 0; t < L; t++) begin iv[t] = 0; qv[t] = 0; end
    for (int n = 0; n < NSYM; n++) begin
      syms[n] = $urandom_range(15, 0);
      for (int k = 0; k < 16; k++)
        for (int m = 0; m < 6; m++) begin
          iv[96*n + 6*k + m]     += (chip_of(syms[n], 2*k) ? 1 : -1) * HALF_SINE[m];
          qv[96*n + 6*k + 3 + m] += (chip_of(syms[n], 2*k+1) ? 1 : -1) * HALF_SINE[m];
        end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < NL; l++) begin
      // The same noise for every setting at this level.
      for (int t = 0; t < L; t++) begin
        ni[t] = (noise(LEVEL[l]) + noise(LEVEL[l]) + noise(LEVEL[l]) + noise(LEVEL[l])) / 2;
        nq[t] = (noise(LEVEL[l]) + noise(LEVEL[l]) + noise(LEVEL[l]) + noise(LEVEL[l])) / 2;
      end
      for (int k = 0; k < NC; k++) begin
        cfg = setting(k);
        got.delete();
        for (int t = 0; t < L; t++) begin
          si = sat8(iv[t] + ni[t]);
          sq = sat8(qv[t] + nq[t]);
          vin = 1;
          sync = (t == 0);
          @(negedge clk);
          vin = 0; sync = 0;
        end
        repeat (4) @(negedge clk);
        errs[l][k] = 0;
        check(got.size() == NSYM, "symbol count");
        for (int n = 0; n < NSYM && n < got.size(); n++) if (got[n] != syms[n]) errs[l][k]++;
        $display("noise %0d  %-9s  symbol errors %0d of %0d", LEVEL[l], NAME[k], errs[l][k], NSYM);
      end
    end
    for (int k = 0; k < NC; k++) check(errs[0][k] == 0, $sformatf("%s error free on a clean signal", NAME[k]));
    check(errs[NL-1][0] < errs[NL-1][NC-1], "CB,FA more robust than CIQ,FIQ3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
