// tb_autocorr: checks the correlation matrix generator against a reference
// computed with 64-bit integers.
//
// Four random 24-bit complex samples arrive every 2-5 clocks (some blocks at
// full scale, including -2^23, to exercise the widest products). For each
// upper-triangle pair the reference forms x_i*conj(x_j) exactly, shifts each
// part right by 10 with sign fill and sums 1024 samples. At every r_new the
// ten 112-bit entries must match, r_new must come exactly once per 1024
// samples, at the second clock edge counting the one that takes the last
// sample, and the output
// must hold between strobes. Three blocks are run.
module tb_autocorr;
  import r3cap_pkg::*;

  logic clk = 0, rst_n = 0;
  iq_t [3:0] x = '0;
  logic in_valid = 0, r_new;
  entry_t [9:0] r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  autocorr dut (.clk, .rst_n, .x, .in_valid, .r, .r_new);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic longint rnd24(input int blk);
    if (blk == 1) return ($urandom_range(0, 1) ? -(longint'(1) << 23) : (longint'(1) << 23) - 1);
    return longint'($signed(24'($urandom)));
  endfunction

  initial begin
    longint sre [10], sim [10];
    longint a [4], b [4];
    int e;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int blk = 0; blk < 3; blk++) begin
      for (int k = 0; k < 10; k++) begin sre[k] = 0; sim[k] = 0; end
      for (int n = 0; n < 1024; n++) begin
        for (int i = 0; i < 4; i++) begin
          a[i] = rnd24(blk);
          b[i] = rnd24(blk);
          x[i].re <= 24'(a[i]);
          x[i].im <= 24'(b[i]);
        end
        e = 0;
        for (int i = 0; i < 4; i++)
          for (int j = i; j < 4; j++) begin
            sre[e] += (a[i] * a[j] + b[i] * b[j]) >>> 10;
            sim[e] += (b[i] * a[j] - a[i] * b[j]) >>> 10;
            e++;
          end
        in_valid <= 1;
        @(posedge clk);
        in_valid <= 0;
        if (n == 1023) begin
          #1;
          check(!r_new, "r_new too early");
          @(posedge clk);
          #1;
          check(r_new, $sformatf("block %0d: no r_new at the second edge", blk));
          for (int k = 0; k < 10; k++) begin
            check(longint'(r[k].re) == sre[k] && longint'(r[k].im) == sim[k],
                  $sformatf("block %0d entry %0d: (%0d,%0d) exp (%0d,%0d)", blk, k,
                            longint'(r[k].re), longint'(r[k].im), sre[k], sim[k]));
          end
        end else begin
          repeat ($urandom_range(1, 4)) begin
            @(posedge clk);
            #1;
            check(!r_new, "r_new inside a block");
          end
        end
      end
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
