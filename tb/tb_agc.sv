// tb_agc: checks the gain control decision against an independent model of
// the 50-sample l1-norm rule.
//
// Windows of 50 samples are generated in three classes: weak (|x| <= 40,
// norm below 3150), in band (66..90) and strong (100..128, above 4550).
// 130 weak windows drive both codes to their maximum (DAC2 first), 10 in-band
// windows must leave them alone, 130 strong windows drive them to the minimum
// (DAC1 first), then 60 random windows follow. After every window the block
// must pulse `update` one clock after the last sample, report the norm, flag
// raise/lower and hold the codes the model predicts. The testbench also
// counts windows at each limit, so that the saturation cases are exercised.
module tb_agc;
  import r3cap_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] raw = 8'd128;
  logic in_valid = 0;
  logic [7:0] dac1, dac2;
  logic update, raise, lower;
  logic [15:0] norm;
  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0;

  always #5 clk = ~clk;

  agc dut (.clk, .rst_n, .raw, .in_valid, .dac1, .dac2, .update, .raise, .lower, .norm);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int m1 = 97, m2 = 97;   // model codes
    int cls, s, mag, v;
    bit up, dn;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int w = 0; w < 330; w++) begin
      cls = (w < 130) ? 0 : (w < 140) ? 1 : (w < 270) ? 2 : int'($urandom_range(0, 2));
      s = 0;
      for (int n = 0; n < 50; n++) begin
        case (cls)
          0: mag = $urandom_range(0, 40);
          1: mag = $urandom_range(66, 90);
          default: mag = $urandom_range(100, 128);
        endcase
        v = ($urandom_range(0, 1) || mag == 128) ? -mag : mag;
        s += mag;
        raw <= 8'(v + 128);
        in_valid <= 1;
        @(posedge clk);
        in_valid <= 0;
        #1;
        if (n < 49) check(!update, "update inside window");
        else begin
          up = s < 3150;
          dn = s > 4550;
          if (up) begin
            if (m2 < 159) m2++;
            else if (m1 < 159) m1++;
            else sat_hi++;
          end else if (dn) begin
            if (m1 > 97) m1--;
            else if (m2 > 97) m2--;
            else sat_lo++;
          end
          check(update, $sformatf("window %0d: no update", w));
          check(int'(norm) == s, $sformatf("window %0d: norm %0d exp %0d", w, norm, s));
          check(raise == up && lower == dn, $sformatf("window %0d: raise/lower %0b%0b", w, raise, lower));
          check(int'(dac1) == m1 && int'(dac2) == m2,
                $sformatf("window %0d: dac %0d %0d exp %0d %0d", w, dac1, dac2, m1, m2));
        end
        repeat ($urandom_range(0, 2)) @(posedge clk);
      end
    end
    check(sat_hi > 0 && sat_lo > 0, $sformatf("limits reached hi=%0d lo=%0d", sat_hi, sat_lo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
