// tb_agc_worst_case: the slowest gain adaptation, from minimum to maximum
// gain, on one complete array core with its ADCs and DACs at the pins.
//
// The four behavioural ADCs first see a constant full-rail input (code 255,
// |x - 128| = 127 per sample), which asks for less gain than the minimum;
// the codes must stay at 97 through 10 windows. Then the input becomes a
// weak signal alternating between codes 126 and 130 (l1 norm 100 per window),
// and the AGC must climb one code per 50-sample window: first DAC2 of every
// receiver from 97 to 159, then DAC1. Checks, on the DAC models' decoded
// codes: every write changes exactly one code per receiver by +1, DAC2 before
// DAC1; at the half-way point DAC2 is at 159 and DAC1 still at 97; the last
// code reaches 159 after 124 raising windows, so between 123 and 125 windows
// (5000 clocks each) after the input changed; after that the codes hold while
// the AGC keeps asking for more. The measured adaptation time is printed.
module tb_agc_worst_case;
  import r3cap_pkg::*;

  logic clk = 0, rst_n = 0;
  logic adc_cs_n, adc_sclk, dac_sclk, dac_sync_n, r_new;
  logic [3:0] adc_sdo, agc_raise, agc_lower;
  logic [7:0] dac_din;
  entry_t [9:0] r;
  logic [7:0][7:0] gain;
  logic [3:0][15:0] agc_norm;
  int checks = 0, failures = 0;

  logic [7:0] value [4], latched [4], mcode [8];
  logic [1:0] mmode [8];
  logic [3:0] su_ok;
  int last_clocks [4], frames [4], writes [8], bad [8];
  bit weak_in = 0;
  bit flip = 0;

  always #5 clk = ~clk;

  ragc dut (.clk, .rst_n, .adc_cs_n, .adc_sclk, .adc_sdo, .dac_sclk, .dac_sync_n,
            .dac_din, .r, .r_new, .gain, .agc_raise, .agc_lower, .agc_norm);

  for (genvar i = 0; i < 4; i++) begin : g_adc
    ads7040_model adc (.cs_n (adc_cs_n), .sclk (adc_sclk), .value (value[i]),
                       .sdo (adc_sdo[i]), .startup_ok (su_ok[i]),
                       .last_clocks (last_clocks[i]), .frames (frames[i]),
                       .latched (latched[i]));
  end
  for (genvar k = 0; k < 8; k++) begin : g_dac
    dac081s101_model dac (.sclk (dac_sclk), .sync_n (dac_sync_n), .din (dac_din[k]),
                          .code (mcode[k]), .mode (mmode[k]), .writes (writes[k]),
                          .bad_frames (bad[k]));
  end

  // input for the next conversion, set while cs_n is high
  always @(posedge adc_cs_n) begin
    flip = !flip;
    for (int i = 0; i < 4; i++) value[i] = weak_in ? (flip ? 8'd130 : 8'd126) : 8'd255;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // code sequence as seen at the DAC pins: one write after every window
  int n_writes = 0, n_steps = 0, n_ceiling = 0, n_floor = 0;
  logic [7:0] prev [8];
  always @(posedge dac_sync_n) begin
    if (rst_n && writes[0] > 0) begin
      #1;
      n_writes++;
      for (int i = 0; i < 4; i++) begin
        int d1, d2;
        d1 = int'(mcode[2*i]) - int'(prev[2*i]);
        d2 = int'(mcode[2*i+1]) - int'(prev[2*i+1]);
        if (weak_in && prev[2*i] == 8'd159 && prev[2*i+1] == 8'd159) begin
          if (i == 0) n_ceiling++;
          check(d1 == 0 && d2 == 0, $sformatf("rx%0d moved above the ceiling", i));
        end else if (weak_in) begin
          if (i == 0) n_steps++;
          // DAC2 climbs first; DAC1 only once DAC2 is at the top
          if (prev[2*i+1] < 8'd159)
            check(d2 == 1 && d1 == 0, $sformatf("rx%0d step DAC1 %0d DAC2 %0d", i, d1, d2));
          else
            check(d1 == 1 && d2 == 0, $sformatf("rx%0d step DAC1 %0d DAC2 %0d", i, d1, d2));
        end else begin
          if (i == 0) n_floor++;
          check(mcode[2*i] == 8'd97 && mcode[2*i+1] == 8'd97,
                $sformatf("rx%0d not at minimum gain: %0d %0d", i, mcode[2*i], mcode[2*i+1]));
        end
        check(mmode[2*i] == 2'b00 && bad[2*i] == 0 && bad[2*i+1] == 0,
              $sformatf("rx%0d DAC frame", i));
      end
    end
    for (int k = 0; k < 8; k++) prev[k] = mcode[k];
  end

  function automatic bit all_at(input logic [7:0] c1, input logic [7:0] c2);
    for (int i = 0; i < 4; i++)
      if (mcode[2*i] != c1 || mcode[2*i+1] != c2) return 0;
    return 1;
  endfunction

  initial begin
    longint t_switch, t_half, t_full;
    for (int k = 0; k < 8; k++) prev[k] = 8'd97;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // full-rail input: at least ten windows at the floor
    wait (writes[0] >= 10);
    @(posedge adc_cs_n);
    weak_in = 1;
    t_switch = cyc;
    while (!all_at(8'd97, 8'd159)) @(posedge clk);
    t_half = cyc;
    check((t_half - t_switch) <= 63 * 5000 + 200,
          $sformatf("DAC2 at top after %0d clocks", t_half - t_switch));
    while (!all_at(8'd159, 8'd159)) @(posedge clk);
    t_full = cyc;
    check((t_full - t_switch >= 123 * 5000) && (t_full - t_switch <= 125 * 5000 + 200),
          $sformatf("full range after %0d clocks", t_full - t_switch));
    // keep asking for more gain for a few windows
    repeat (5 * 5000) @(posedge clk);
    check(all_at(8'd159, 8'd159), "codes left the maximum");
    check(n_floor >= 10, $sformatf("windows at the floor %0d", n_floor));
    check(n_ceiling >= 4, $sformatf("windows at the ceiling %0d", n_ceiling));
    check(n_steps >= 123 && n_steps <= 125, $sformatf("raising windows %0d", n_steps));
    check(su_ok == 4'hF, "ADC start-up frame");
    $display("minimum to maximum gain in %0d raising windows, %0.3f ms",
             n_steps, real'(t_full - t_switch) / 100000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
