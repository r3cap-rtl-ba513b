// tb_r3cap_fpga: end-to-end test of the two-array top at its default sizes.
//
// Each array has four behavioural ADCs, eight behavioural gain DACs and an
// analog model whose amplitude follows the DAC codes (closed AGC loop).
//   array 0: a weak source (amplitude 40 codes) at phases 0, 90, -45, 135
//            degrees; the AGC must raise the gain into its band and hold it.
//   array 1: a source at phases 10, -80, 120, 30 degrees, at amplitude 60 for
//            the first 1.5 ms (gain goes up), then 400, which clips the ADCs
//            (codes 0 and 255) so that the AGC lowers the gain to its minimum
//            and keeps asking for less.
// The processor side is an AXI4-Lite master per array: at every new matrix it
// reads the ready word and the 35 data words, rebuilds the ten entries,
// checks them against the core's own outputs, checks the phases of the
// off-diagonal entries (within 3 degrees, for blocks without clipping), then
// clears the ready flag and reads it back. Four matrices per array are run
// (about 4.2 ms of device time).
// Mechanisms counted (each must occur): ADC start-up frames, matrices
// delivered, ready flags cleared, gain raised, gain lowered, gain held in
// band, lower request at the gain floor, DAC frames written, samples at code
// 0 (the -128 negation case of the demodulator).
module tb_r3cap_fpga;
  import r3cap_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] adc_cs_n, adc_sclk, dac_sclk, dac_sync_n, r_new;
  logic [1:0][3:0] adc_sdo;
  logic [1:0][7:0] dac_din;
  axil_req_t [1:0] axi_req;
  axil_rsp_t [1:0] axi_rsp;
  int checks = 0, failures = 0;

  // analog side, per array
  logic [7:0] value [2][4], latched [2][4], mcode [2][8], d1 [2][4], d2 [2][4];
  logic [1:0] mmode [2][8];
  logic [3:0] su_ok [2];
  int last_clocks [2][4], frames [2][4], writes [2][8], bad [2][8], clipped [2];
  real amp [2] = '{40.0, 60.0};
  real phase [2][4] = '{'{0.0, 90.0, -45.0, 135.0}, '{10.0, -80.0, 120.0, 30.0}};

  always #5 clk = ~clk;

  r3cap_fpga dut (.clk, .rst_n, .adc_cs_n, .adc_sclk, .adc_sdo, .dac_sclk,
                  .dac_sync_n, .dac_din, .axi_req, .axi_rsp, .r_new);

  for (genvar a = 0; a < 2; a++) begin : g_arr
    for (genvar i = 0; i < 4; i++) begin : g_adc
      ads7040_model adc (.cs_n (adc_cs_n[a]), .sclk (adc_sclk[a]), .value (value[a][i]),
                         .sdo (adc_sdo[a][i]), .startup_ok (su_ok[a][i]),
                         .last_clocks (last_clocks[a][i]), .frames (frames[a][i]),
                         .latched (latched[a][i]));
      assign d1[a][i] = mcode[a][2*i];
      assign d2[a][i] = mcode[a][2*i+1];
    end
    for (genvar k = 0; k < 8; k++) begin : g_dac
      dac081s101_model dac (.sclk (dac_sclk[a]), .sync_n (dac_sync_n[a]),
                            .din (dac_din[a][k]), .code (mcode[a][k]), .mode (mmode[a][k]),
                            .writes (writes[a][k]), .bad_frames (bad[a][k]));
    end
    array_source_model src (.cs_n (adc_cs_n[a]), .amp (amp[a]), .phase_deg (phase[a]),
                            .dac1 (d1[a]), .dac2 (d2[a]), .value (value[a]),
                            .clipped_low (clipped[a]));
  end

  // ---------------------------------------------------------- mechanisms
  int n_raise = 0, n_lower = 0, n_hold = 0, n_floor = 0, n_clear = 0;
  int n_matrix [2] = '{0, 0};
  logic [7:0] g0_prev [2];

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.g_array[0].u_ragc.agc_update[0]) begin
        if (dut.g_array[0].agc_raise[0]) n_raise++;
        else if (!dut.g_array[0].agc_lower[0]) n_hold++;
      end
      if (dut.g_array[1].u_ragc.agc_update[0]) begin
        if (dut.g_array[1].agc_raise[0]) n_raise++;
        else if (dut.g_array[1].agc_lower[0]) begin
          if (dut.g_array[1].gain[0] == 8'(DAC_MIN) && dut.g_array[1].gain[1] == 8'(DAC_MIN) &&
              g0_prev[1] == 8'(DAC_MIN))
            n_floor++;
          else
            n_lower++;
        end else n_hold++;
      end
      g0_prev[1] <= dut.g_array[1].gain[1];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  function automatic real wrap180(input real x);
    while (x > 180.0) x -= 360.0;
    while (x <= -180.0) x += 360.0;
    return x;
  endfunction

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // ---------------------------------------------------------- AXI master
  task automatic axi_read(input int a, input int word, output logic [31:0] d);
    axi_req[a].arvalid <= 1;
    axi_req[a].araddr  <= 8'(word * 4);
    axi_req[a].rready  <= 1;
    @(posedge clk iff axi_rsp[a].arready);
    axi_req[a].arvalid <= 0;
    @(posedge clk iff axi_rsp[a].rvalid);
    d = axi_rsp[a].rdata;
    check(axi_rsp[a].rresp == 2'b00, "read OKAY");
  endtask

  task automatic axi_write(input int a, input int word, input logic [31:0] d);
    axi_req[a].awvalid <= 1; axi_req[a].awaddr <= 8'(word * 4);
    axi_req[a].wvalid  <= 1; axi_req[a].wdata  <= d; axi_req[a].wstrb <= 4'hF;
    axi_req[a].bready  <= 1;
    @(posedge clk iff axi_rsp[a].awready);
    axi_req[a].awvalid <= 0; axi_req[a].wvalid <= 0;
    @(posedge clk iff axi_rsp[a].bvalid);
    axi_req[a].bready  <= 0;
  endtask

  task automatic host(input int a);
    logic [31:0] d;
    logic [1119:0] bits;
    real re [10], im [10], ph;
    int idx [4][4], e;
    bit clean;
    e = 0;
    for (int i = 0; i < 4; i++) for (int j = i; j < 4; j++) begin idx[i][j] = e; e++; end
    for (int m = 0; m < 4; m++) begin
      @(posedge clk iff r_new[a]);
      n_matrix[a]++;
      clean = (a == 0) || (amp[a] < 100.0 && clipped[a] == 0);
      repeat (2) @(posedge clk);
      axi_read(a, 0, d);
      check(d == 32'd1, $sformatf("array %0d matrix %0d: ready flag %0h", a, m, d));
      for (int w = 1; w < 36; w++) begin
        axi_read(a, w, d);
        bits[32*(w-1) +: 32] = d;
      end
      for (int k = 0; k < 10; k++) begin
        logic [55:0] pr, pi;
        pr = bits[112*k + 56 +: 56];
        pi = bits[112*k +: 56];
        re[k] = real'($signed(pr)) / 17592186044416.0;   // 44 fraction bits
        im[k] = real'($signed(pi)) / 17592186044416.0;
        check(pr == 56'(a == 0 ? dut.g_array[0].r[k].re : dut.g_array[1].r[k].re) &&
              pi == 56'(a == 0 ? dut.g_array[0].r[k].im : dut.g_array[1].r[k].im),
              $sformatf("array %0d entry %0d read back", a, k));
      end
      axi_write(a, 0, 32'd1);
      axi_read(a, 0, d);
      check(d == 32'd0, "ready flag cleared");
      if (d == 32'd0) n_clear++;
      if (m == 0 || !clean) continue;   // filter start-up / clipped block
      for (int i = 0; i < 4; i++) begin
        check(im[idx[i][i]] == 0.0 && re[idx[i][i]] > 0.0, "diagonal real and positive");
        for (int j = i + 1; j < 4; j++) begin
          ph = $atan2(im[idx[i][j]], re[idx[i][j]]) * 180.0 / 3.14159265358979;
          check(rabs(wrap180(ph - (phase[a][i] - phase[a][j]))) < 3.0,
                $sformatf("array %0d matrix %0d r%0d%0d phase %f exp %f", a, m, i + 1, j + 1,
                          ph, wrap180(phase[a][i] - phase[a][j])));
        end
      end
    end
  endtask

  initial begin
    axi_req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      host(0);
      host(1);
      begin
        #1500us;
        amp[1] = 400.0;
      end
    join
    check(su_ok[0] == 4'hF && su_ok[1] == 4'hF, "ADC start-up frames");
    for (int a = 0; a < 2; a++)
      for (int k = 0; k < 8; k++)
        check(mcode[a][k] == (a == 0 ? dut.g_array[0].gain[k] : dut.g_array[1].gain[k]) &&
              bad[a][k] == 0 && mmode[a][k] == 2'b00,
              $sformatf("array %0d DAC %0d holds code %0d", a, k, mcode[a][k]));
    check(dut.g_array[0].agc_norm[0] >= 16'(AGC_LOW) && dut.g_array[0].agc_norm[0] <= 16'(AGC_HIGH),
          $sformatf("array 0 settled in band, norm %0d", dut.g_array[0].agc_norm[0]));
    $display("mechanisms: startup=%0d matrices=%0d/%0d ready_cleared=%0d raise=%0d lower=%0d hold=%0d floor=%0d dac_frames=%0d/%0d code0_samples=%0d",
             int'(su_ok[0][0]) + int'(su_ok[1][0]), n_matrix[0], n_matrix[1], n_clear, n_raise, n_lower,
             n_hold, n_floor, writes[0][0], writes[1][0], clipped[1]);
    check(su_ok[0][0] && su_ok[1][0], "mechanism: ADC start-up");
    check(n_matrix[0] == 4 && n_matrix[1] == 4, "mechanism: matrices delivered");
    check(n_clear == 8, "mechanism: ready flag cleared");
    check(n_raise > 0, "mechanism: gain raised");
    check(n_lower > 0, "mechanism: gain lowered");
    check(n_hold > 0, "mechanism: gain held in band");
    check(n_floor > 0, "mechanism: lower request at the gain floor");
    check(writes[0][0] > 0 && writes[1][0] > 0, "mechanism: DAC frames");
    check(clipped[1] > 0, "mechanism: samples at code 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
