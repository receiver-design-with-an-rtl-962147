// tb_hamming_31_26_dec: checks the Hamming (31,26) decoder on error-free
// code words and on every single-bit error position, with random data.
module tb_hamming_31_26_dec;
  import tb_util_pkg::*;

  logic [30:0] cw;
  logic [25:0] data;
  logic [4:0]  syn;
  logic        corr;
  int checks = 0, failures = 0;

  hamming_31_26_dec dut (.cw_i(cw), .data_o(data), .syndrome_o(syn), .corrected_o(corr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [25:0] d;
    logic [30:0] good;
    for (int t = 0; t < 40; t++) begin
      d = 26'($urandom);
      if (t == 0) d = '0;
      if (t == 1) d = '1;
      good = ham_encode(d);
      cw = good;
      #1;
      check(data === d && syn == 0 && !corr, $sformatf("clean word %0d", t));
      for (int p = 0; p < 31; p++) begin
        cw = good ^ (31'(1) << p);
        #1;
        check(data === d, $sformatf("data after error at bit %0d", p));
        check(corr && 32'(syn) == ham_column(p), $sformatf("syndrome for bit %0d", p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
