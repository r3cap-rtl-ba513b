// tb_ragc: one array core with four behavioural ADCs, eight behavioural gain
// DACs and a single-source analog model, run for three correlation blocks.
//
// The source reaches the four receivers with phases 0, 70, -50 and 160
// degrees at an amplitude inside the AGC band, so the gain codes stay put.
// Checks: a new matrix exactly every 102400 clocks (1024 samples of 1 us at
// 100 MHz); diagonal entries real and positive; every off-diagonal entry
// r_ij with the phase phi_i - phi_j within 3 degrees and a magnitude of
// sqrt(r_ii r_jj) within 3 % (one coherent source); the DAC models holding
// the core's gain codes after every write, in normal mode and 16-bit frames;
// an AGC update, and a DAC write, every 50 samples.
module tb_ragc;
  import r3cap_pkg::*;

  logic clk = 0, rst_n = 0;
  logic adc_cs_n, adc_sclk, dac_sclk, dac_sync_n, r_new;
  logic [3:0] adc_sdo, agc_raise, agc_lower;
  logic [7:0] dac_din;
  entry_t [9:0] r;
  logic [7:0][7:0] gain;
  logic [3:0][15:0] agc_norm;
  int checks = 0, failures = 0;

  logic [7:0] value [4], latched [4], mcode [8], d1 [4], d2 [4];
  logic [1:0] mmode [8];
  logic [3:0] su_ok;
  int last_clocks [4], frames [4], writes [8], bad [8], clipped;
  real amp = 110.0;
  real phase [4] = '{0.0, 70.0, -50.0, 160.0};

  always #5 clk = ~clk;

  ragc dut (.clk, .rst_n, .adc_cs_n, .adc_sclk, .adc_sdo, .dac_sclk, .dac_sync_n,
            .dac_din, .r, .r_new, .gain, .agc_raise, .agc_lower, .agc_norm);

  for (genvar i = 0; i < 4; i++) begin : g_adc
    ads7040_model adc (.cs_n (adc_cs_n), .sclk (adc_sclk), .value (value[i]),
                       .sdo (adc_sdo[i]), .startup_ok (su_ok[i]),
                       .last_clocks (last_clocks[i]), .frames (frames[i]),
                       .latched (latched[i]));
    assign d1[i] = mcode[2*i];
    assign d2[i] = mcode[2*i+1];
  end
  for (genvar k = 0; k < 8; k++) begin : g_dac
    dac081s101_model dac (.sclk (dac_sclk), .sync_n (dac_sync_n), .din (dac_din[k]),
                          .code (mcode[k]), .mode (mmode[k]), .writes (writes[k]),
                          .bad_frames (bad[k]));
  end

  array_source_model src (.cs_n (adc_cs_n), .amp, .phase_deg (phase), .dac1 (d1),
                          .dac2 (d2), .value, .clipped_low (clipped));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  function automatic real wrap180(input real a);
    while (a > 180.0) a -= 360.0;
    while (a <= -180.0) a += 360.0;
    return a;
  endfunction

  function automatic real rabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  int updates = 0;
  always @(posedge clk) if (rst_n && dut.agc_update[0]) updates++;

  initial begin
    longint cyc = 0, t_last = 0;
    real re [10], im [10], ph, mag;
    int e, idx [4][4];
    e = 0;
    for (int i = 0; i < 4; i++) for (int j = i; j < 4; j++) begin idx[i][j] = e; e++; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork forever begin @(posedge clk); cyc++; end join_none
    for (int m = 0; m < 3; m++) begin
      @(posedge clk iff r_new);
      if (m > 0) check(cyc - t_last == 102400, $sformatf("matrix spacing %0d", cyc - t_last));
      t_last = cyc;
      #1;
      for (int k = 0; k < 10; k++) begin
        re[k] = real'(longint'(r[k].re)) / 17592186044416.0;   // 2^44
        im[k] = real'(longint'(r[k].im)) / 17592186044416.0;
      end
      if (m == 0) continue;   // the first block includes the filter start-up
      for (int i = 0; i < 4; i++) begin
        check(r[idx[i][i]].im == 0 && re[idx[i][i]] > 0.0,
              $sformatf("r%0d%0d diagonal (%f,%f)", i + 1, i + 1, re[idx[i][i]], im[idx[i][i]]));
        for (int j = i + 1; j < 4; j++) begin
          ph  = $atan2(im[idx[i][j]], re[idx[i][j]]) * 180.0 / 3.14159265358979;
          mag = $sqrt(re[idx[i][j]] ** 2 + im[idx[i][j]] ** 2);
          check(rabs(wrap180(ph - (phase[i] - phase[j]))) < 3.0,
                $sformatf("r%0d%0d phase %f exp %f", i + 1, j + 1, ph, wrap180(phase[i] - phase[j])));
          check(rabs(mag / $sqrt(re[idx[i][i]] * re[idx[j][j]]) - 1.0) < 0.03,
                $sformatf("r%0d%0d coherence %f", i + 1, j + 1, mag / $sqrt(re[idx[i][i]] * re[idx[j][j]])));
        end
      end
    end
    check(su_ok == 4'hF, "ADC start-up frame");
    check(updates >= 3 * 1024 / 50, $sformatf("AGC updates %0d", updates));
    for (int k = 0; k < 8; k++) begin
      check(mcode[k] == gain[k] && mmode[k] == 2'b00 && bad[k] == 0,
            $sformatf("DAC %0d code %0d exp %0d", k, mcode[k], gain[k]));
      check(writes[k] == updates || writes[k] == updates - 1,
            $sformatf("DAC %0d writes %0d updates %0d", k, writes[k], updates));
    end
    $display("gain codes %p, last norms %p", gain, agc_norm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
