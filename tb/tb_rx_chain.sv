// tb_rx_chain: checks one receiver's digital chain end to end.
//
// Input: an 8-bit tone at a quarter of the sample rate (the 5.25 MHz IF seen
// at 1 Msps), raw = round(128 + A cos(pi/2 n + phi)), clipped to 0..255,
// for several amplitudes and phases, including a clipping one that hits
// code 0 (-128 after DC removal). A reference model (offset removal, the
// 4-state demodulation table, the coefficient convolution) predicts every
// I/Q output bit-exactly; the outputs must appear three clock edges after
// the sample. After the filter settles, I and Q must also match the analytic
// baseband value (A/2) e^{j phi} times the filter's DC gain within 3 %.
// The AGC must report an update after every 50 samples.
module tb_rx_chain;
  import r3cap_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] raw = 8'd128;
  logic in_valid = 0, out_valid;
  iq_t  iq;
  logic [7:0] dac1, dac2;
  logic agc_update, agc_raise, agc_lower;
  logic [15:0] agc_norm;
  int checks = 0, failures = 0;
  int hi [FIR_TAPS], hq [FIR_TAPS];
  int updates = 0;

  always #5 clk = ~clk;

  rx_chain dut (.clk, .rst_n, .raw, .in_valid, .iq, .out_valid, .dac1, .dac2,
                .agc_update, .agc_raise, .agc_lower, .agc_norm);

  always @(posedge clk) if (rst_n && agc_update) updates++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic real rabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic int nsat(input int v);
    return (v == -128) ? 127 : -v;
  endfunction

  initial begin
    real amp [4] = '{40.0, 100.0, 127.0, 200.0};
    real phs [4] = '{0.3, 1.9, -2.5, 0.8};
    int n = 0, v, xi, xq, ei, eq, sumh;
    real ai, aq, pi_ = 3.14159265358979;
    for (int k = 0; k < FIR_TAPS; k++) begin hi[k] = 0; hq[k] = 0; end
    sumh = 0;
    for (int k = 0; k < FIR_TAPS; k++) sumh += int'(LPF_COEFS[k]);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int c = 0; c < 4; c++) begin
      for (int t = 0; t < 200; t++) begin
        real s;
        s = 128.0 + amp[c] * $cos(pi_ / 2.0 * n + phs[c]);
        v = (s < 0.0) ? 0 : (s > 255.0) ? 255 : int'(s);   // int'() rounds
        raw <= 8'(v);
        in_valid <= 1;
        v = v - 128;
        case (n % 4)
          0: begin xi = v;       xq = 0;       end
          1: begin xi = 0;       xq = nsat(v); end
          2: begin xi = nsat(v); xq = 0;       end
          default: begin xi = 0; xq = v;       end
        endcase
        n++;
        for (int k = FIR_TAPS - 1; k > 0; k--) begin hi[k] = hi[k-1]; hq[k] = hq[k-1]; end
        hi[0] = xi; hq[0] = xq;
        ei = 0; eq = 0;
        for (int k = 0; k < FIR_TAPS; k++) begin
          ei += hi[k] * int'(LPF_COEFS[k]);
          eq += hq[k] * int'(LPF_COEFS[k]);
        end
        @(posedge clk);
        in_valid <= 0;
        @(posedge clk);
        #1;
        check(!out_valid, "output too early");
        @(posedge clk);
        #1;
        check(out_valid && int'(iq.re) == ei && int'(iq.im) == eq,
              $sformatf("case %0d sample %0d: v=%0b (%0d,%0d) exp (%0d,%0d)", c, t, out_valid,
                        iq.re, iq.im, ei, eq));
        if (t >= 60 && c < 3) begin
          ai = amp[c] / 2.0 * $cos(phs[c]) * sumh;
          aq = amp[c] / 2.0 * $sin(phs[c]) * sumh;
          check(rabs(real'(iq.re) - ai) < 0.03 * amp[c] / 2.0 * sumh &&
                rabs(real'(iq.im) - aq) < 0.03 * amp[c] / 2.0 * sumh,
                $sformatf("case %0d baseband (%0d,%0d) exp (%0f,%0f)", c, iq.re, iq.im, ai, aq));
        end
        repeat ($urandom_range(0, 2)) @(posedge clk);
      end
    end
    @(posedge clk);
    check(updates == 800 / 50, $sformatf("AGC updates %0d exp %0d", updates, 800 / 50));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
