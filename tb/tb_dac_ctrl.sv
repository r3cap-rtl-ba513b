// tb_dac_ctrl: checks the gain DAC writer against eight behavioural DACs.
//
// Random code sets are loaded, sometimes while a frame is still running (the
// request must be kept and sent next). After each write the models must hold
// the loaded codes in normal-operation mode, every frame must carry exactly
// 16 bits, sync_n must stay low for 16 serial periods (64 clocks) per frame
// and the number of frames must equal the number of distinct requests.
module tb_dac_ctrl;
  import r3cap_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load = 0, busy, sclk, sync_n;
  logic [7:0][7:0] codes = '0;
  logic [7:0] din;
  logic [7:0] mcode [8];
  logic [1:0] mmode [8];
  int writes [8], bad [8];
  int checks = 0, failures = 0;
  int low_len = 0, low_cnt = 0;

  always #5 clk = ~clk;

  dac_ctrl dut (.clk, .rst_n, .load, .codes, .busy, .sclk, .sync_n, .din);

  for (genvar i = 0; i < 8; i++) begin : g_dac
    dac081s101_model dac (.sclk, .sync_n, .din (din[i]), .code (mcode[i]),
                          .mode (mmode[i]), .writes (writes[i]), .bad_frames (bad[i]));
  end

  // length of every sync_n low period
  always @(posedge clk) begin
    if (!rst_n) low_cnt = 0;
    else if (!sync_n) low_cnt++;
    else if (low_cnt != 0) begin
      low_len = low_cnt;
      low_cnt = 0;
      checks++;
      if (low_len != 64) begin failures++; $display("FAIL sync_n low for %0d clocks", low_len); end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [7:0][7:0] last;
    int requests = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int w = 0; w < 60; w++) begin
      for (int i = 0; i < 8; i++) codes[i] <= 8'($urandom);
      load <= 1;
      @(posedge clk);
      load <= 0;
      last = codes;
      requests++;
      if (w % 5 == 4) begin
        // second request in the middle of the frame
        repeat (20) @(posedge clk);
        for (int i = 0; i < 8; i++) codes[i] <= 8'($urandom);
        load <= 1;
        @(posedge clk);
        load <= 0;
        last = codes;
        requests++;
      end
      @(posedge clk iff !busy);
      repeat (2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        check(mcode[i] == last[i], $sformatf("dac %0d code %0d exp %0d", i, mcode[i], last[i]));
        check(mmode[i] == 2'b00, "normal operation mode bits");
        check(writes[i] == requests, $sformatf("dac %0d writes %0d exp %0d", i, writes[i], requests));
        check(bad[i] == 0, "frame length");
      end
      repeat ($urandom_range(0, 30)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
