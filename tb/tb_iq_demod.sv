// tb_iq_demod: checks the quadrature demodulator against the state table.
//
// Random samples (with -128 and 127 forced regularly) arrive with gaps of
// 0-3 idle clocks. A reference keeps its own sample count n and expects, for
// n mod 4 = 0,1,2,3: (I,Q) = (x,0), (0,-x), (-x,0), (0,x), where negating
// -128 gives +127, one clock after each input.
module tb_iq_demod;
  import r3cap_pkg::*;

  logic clk = 0, rst_n = 0;
  sample_t x = '0, xi, xq;
  logic in_valid = 0, out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  iq_demod dut (.clk, .rst_n, .x, .in_valid, .xi, .xq, .out_valid);

  function automatic int nsat(input int v);
    return (v == -128) ? 127 : -v;
  endfunction

  initial begin
    int n = 0;
    int exp_i, exp_q, v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      v = (t % 7 == 0) ? -128 : (t % 11 == 0) ? 127 : int'($urandom_range(0, 255)) - 128;
      x <= sample_t'(v);
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      case (n % 4)
        0: begin exp_i = v;       exp_q = 0;       end
        1: begin exp_i = 0;       exp_q = nsat(v); end
        2: begin exp_i = nsat(v); exp_q = 0;       end
        default: begin exp_i = 0; exp_q = v;       end
      endcase
      n++;
      #1;
      checks++;
      if (!out_valid || int'(xi) != exp_i || int'(xq) != exp_q) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d x=%0d got v=%0b I=%0d Q=%0d exp I=%0d Q=%0d",
                   n - 1, v, out_valid, xi, xq, exp_i, exp_q);
      end
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk);
        #1;
        checks++;
        if (out_valid) begin failures++; $display("FAIL spurious valid"); end
      end
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
