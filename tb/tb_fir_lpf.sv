// tb_fir_lpf: checks the low-pass filter bit-exactly and in frequency.
//
// Phase 1: random 8-bit samples, one every 3-6 clocks; the reference keeps
// its own history and forms sum(h[k] * x[n-k]) with the coefficient table;
// each output must match exactly and appear at the second clock edge after
// the input is presented.
// Phase 2: a constant input must settle to x * sum(h) (DC gain 0.94, pass
// band); an alternating +-100 input (w = pi, where demodulation puts the
// image) must settle at least 50 dB below the same amplitude at DC.
module tb_fir_lpf;
  import r3cap_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [7:0]  x = '0;
  logic               in_valid = 0, out_valid;
  logic signed [23:0] y;
  int checks = 0, failures = 0;
  int hist [FIR_TAPS];

  always #5 clk = ~clk;

  fir_lpf dut (.clk, .rst_n, .x, .in_valid, .y, .out_valid);

  task automatic push(input int v, output int yout, output int lat);
    int exp_y;
    for (int k = FIR_TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    exp_y = 0;
    for (int k = 0; k < FIR_TAPS; k++) exp_y += hist[k] * int'(LPF_COEFS[k]);
    x <= 8'(v);
    in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
      #1;
    end while (!out_valid && lat < 10);
    yout = int'(y);
    checks++;
    if (int'(y) != exp_y || lat != 1) begin  // second clock edge counting the one that took x
      failures++;
      if (failures < 10) $display("FAIL y=%0d exp=%0d latency=%0d", y, exp_y, lat);
    end
    repeat ($urandom_range(1, 4)) @(posedge clk);
  endtask

  initial begin
    int yo, lat, sum, y_dc, y_pi;
    for (int k = 0; k < FIR_TAPS; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 500; t++) push(int'($urandom_range(0, 255)) - 128, yo, lat);
    sum = 0;
    for (int k = 0; k < FIR_TAPS; k++) sum += int'(LPF_COEFS[k]);
    for (int t = 0; t < 40; t++) push(100, yo, lat);
    y_dc = yo;
    checks++;
    if (y_dc != 100 * sum) begin failures++; $display("FAIL DC %0d", y_dc); end
    for (int t = 0; t < 40; t++) push((t % 2) ? 100 : -100, yo, lat);
    y_pi = (yo < 0) ? -yo : yo;
    checks++;
    // 50 dB is a factor 316
    if (y_pi * 316 > 100 * 32768) begin
      failures++;
      $display("FAIL stop band: %0d against %0d", y_pi, 100 * 32768);
    end
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
