// tb_adc_ctrl: checks the ADC controller against four behavioural ADCs.
//
// Each model is given a fresh random value after every sample strobe and
// converts it on the next cs_n falling edge. The testbench checks that the
// first frame is a start-up frame of at least 16 clocks without a strobe,
// that every later frame has exactly 10 sclk rising edges, that strobes come
// exactly 100 clocks (1 us) apart, and that each byte equals the value its
// ADC converted in that frame.
module tb_adc_ctrl;
  import r3cap_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cs_n, sclk, valid, started;
  logic [3:0] sdo;
  logic [3:0][7:0] sample;
  logic [7:0] value [4];
  logic [3:0] su_ok;
  int   last_clocks [4], frames [4];
  logic [7:0] latched [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_ctrl dut (.clk, .rst_n, .cs_n, .sclk, .sdo, .sample, .valid, .started);

  for (genvar i = 0; i < 4; i++) begin : g_adc
    ads7040_model adc (.cs_n, .sclk, .value (value[i]), .sdo (sdo[i]),
                       .startup_ok (su_ok[i]), .last_clocks (last_clocks[i]),
                       .frames (frames[i]), .latched (latched[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint t_last = -1, t_now;
    int cyc = 0;
    for (int i = 0; i < 4; i++) value[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      forever begin @(posedge clk); cyc++; end
    join_none
    for (int s = 0; s < 300; s++) begin
      @(posedge clk iff valid);
      t_now = cyc;
      if (s == 0) begin
        check(su_ok == 4'hF, "start-up frame of at least 16 clocks");
        check(frames[0] == 2, $sformatf("first strobe after start-up + 1 frame (%0d)", frames[0]));
      end else begin
        check(t_now - t_last == 100, $sformatf("strobe spacing %0d", t_now - t_last));
      end
      t_last = t_now;
      for (int i = 0; i < 4; i++) begin
        check(sample[i] == latched[i], $sformatf("adc %0d byte %02x exp %02x", i, sample[i], latched[i]));
        check(last_clocks[i] == 10, $sformatf("adc %0d frame had %0d clocks", i, last_clocks[i]));
        value[i] = (s % 10 == 3) ? 8'h00 : (s % 10 == 7) ? 8'hFF : 8'($urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
