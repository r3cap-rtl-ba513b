// tb_axi_regs: checks the matrix register bank through its AXI4-Lite port.
//
// A random matrix is presented with r_new; an AXI master task then reads
// words 0..35 (sometimes holding rready low for a few clocks) and the
// testbench rebuilds the 1120-bit string and compares it with the entries,
// real part above imaginary part, r11 in the lowest bits. It checks the
// ready flag (set by r_new, cleared by writing 1 to word 0, not cleared by
// writing 0), OKAY responses, SLVERR and zero data for word 40, and that
// read data stays stable while rvalid waits for rready.
module tb_axi_regs;
  import r3cap_pkg::*;

  logic clk = 0, rst_n = 0;
  entry_t [9:0] r = '0;
  logic r_new = 0;
  axil_req_t req = '0;
  axil_rsp_t rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi_regs dut (.clk, .rst_n, .r, .r_new, .req, .rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic axi_read(input int word, input int stall, output logic [31:0] d, output logic [1:0] resp);
    logic [31:0] first;
    req.arvalid <= 1;
    req.araddr  <= 8'(word * 4);
    req.rready  <= 0;
    @(posedge clk iff rsp.arready);
    req.arvalid <= 0;
    @(posedge clk iff rsp.rvalid);
    first = rsp.rdata;
    repeat (stall) begin
      @(posedge clk);
      check(rsp.rvalid && rsp.rdata == first, "read data held while waiting");
    end
    req.rready <= 1;
    d    = rsp.rdata;
    resp = rsp.rresp;
    @(posedge clk);
    req.rready <= 0;
  endtask

  task automatic axi_write(input int word, input logic [31:0] d);
    req.awvalid <= 1; req.awaddr <= 8'(word * 4);
    req.wvalid  <= 1; req.wdata  <= d; req.wstrb <= 4'hF;
    req.bready  <= 1;
    @(posedge clk iff rsp.awready);
    req.awvalid <= 0; req.wvalid <= 0;
    @(posedge clk iff rsp.bvalid);
    check(rsp.bresp == 2'b00, "write response OKAY");
    req.bready <= 0;
  endtask

  initial begin
    logic [31:0] d;
    logic [1:0]  resp;
    logic [1119:0] got, expv;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    axi_read(0, 0, d, resp);
    check(d == 0, "ready clear after reset");
    for (int m = 0; m < 8; m++) begin
      for (int k = 0; k < 10; k++) begin
        r[k].re <= {$urandom, $urandom} ;
        r[k].im <= {$urandom, $urandom};
      end
      @(posedge clk);
      r_new <= 1;
      @(posedge clk);
      r_new <= 0;
      @(posedge clk);
      axi_read(0, 0, d, resp);
      check(d == 32'd1 && resp == 2'b00, $sformatf("ready set (%0h)", d));
      for (int w = 1; w < 36; w++) begin
        axi_read(w, (w % 4 == 0) ? 3 : 0, d, resp);
        check(resp == 2'b00, "read response OKAY");
        got[32*(w-1) +: 32] = d;
      end
      for (int k = 0; k < 10; k++) expv[112*k +: 112] = {r[k].re, r[k].im};
      check(got == expv, $sformatf("matrix %0d contents", m));
      axi_write(0, 32'd0);
      axi_read(0, 0, d, resp);
      check(d == 32'd1, "writing 0 keeps ready");
      axi_write(0, 32'd1);
      axi_read(0, 0, d, resp);
      check(d == 32'd0, "writing 1 clears ready");
    end
    axi_read(40, 0, d, resp);
    check(resp == 2'b10 && d == 0, "out-of-range read gives SLVERR");
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
