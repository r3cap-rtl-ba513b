// tb_r3cap_pkg: exhaustive check of the package's sample helpers and of the
// low-pass coefficient table.
//
// Every 8-bit code goes through dc_remove (expected code - 128), every signed
// sample through neg_sat (expected -x, with -128 giving +127) and abs_val
// (expected |x|, 128 for -128). The coefficient table must be symmetric
// (linear phase) and its sum, the DC gain, must lie between 0.9 and 1.0.
module tb_r3cap_pkg;
  import r3cap_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int sum;
    for (int c = 0; c < 256; c++) begin
      int x, ex_neg;
      check(int'(dc_remove(8'(c))) == c - 128, $sformatf("dc_remove(%0d)", c));
      x = c - 128;
      ex_neg = (x == -128) ? 127 : -x;
      check(int'(neg_sat(sample_t'(x))) == ex_neg, $sformatf("neg_sat(%0d)", x));
      check(int'(abs_val(sample_t'(x))) == ((x < 0) ? -x : x), $sformatf("abs_val(%0d)", x));
    end
    sum = 0;
    for (int k = 0; k < FIR_TAPS; k++) begin
      sum += int'(LPF_COEFS[k]);
      check(LPF_COEFS[k] == LPF_COEFS[FIR_TAPS-1-k], $sformatf("coefficient symmetry %0d", k));
    end
    check(sum > 29491 && sum <= 32768, $sformatf("DC gain %0d/32768", sum));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
