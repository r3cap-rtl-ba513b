// iq_demod: digital downconversion and quadrature demodulation of one
// receiver's sample stream.
//
// The 5.25 MHz intermediate frequency sampled at 1 Msps lands at a quarter of
// the sample rate, so multiplying sample n by exp(-j*pi/2*n) (1, -j, -1, j,
// ...) moves it to baseband. The state table below, which this module
// follows, is that sequence; a positive exponent would swap the sign of Q.
// The multiplication needs no multiplier: a 2-bit state S1 S0
// counts the samples, S0 chooses whether the sample goes to the in-phase (I)
// or the quadrature (Q) path, S1 chooses whether it is negated, and the other
// path is zero:
//
//   S1 S0 | xI     xQ
//   0  0  | x      0
//   0  1  | 0      -x
//   1  0  | -x     0
//   1  1  | 0      x
//
// and the state advances 00 -> 01 -> 10 -> 11 -> 00 on every input sample.
// The negation saturates: -128 has no 8-bit negative and becomes +127.
//
// Interface: `x` is the DC-free signed sample with `in_valid`; `xi`, `xq` are
// registered and appear with `out_valid` one clock later. The state resets to
// 00. The table, the saturation rule and the mux-and-negate structure follow
// the system description; the output register and the reset state are this
// design's choices.
module iq_demod
  import r3cap_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x,
  input  logic    in_valid,
  output sample_t xi,
  output sample_t xq,
  output logic    out_valid
);

  logic [1:0] s;          // {S1, S0}
  sample_t    xi_d, xq_d;

  always_comb begin
    sample_t routed;
    routed = s[1] ? neg_sat(x) : x;
    xi_d   = '0;
    xq_d   = '0;
    // Q is negated in state 01 and passed in state 11: the opposite of I
    unique case (s)
      2'b00, 2'b10: xi_d = routed;
      2'b01, 2'b11: xq_d = s[1] ? x : neg_sat(x);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s         <= 2'b00;
      xi        <= '0;
      xq        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        xi <= xi_d;
        xq <= xq_d;
        s  <= s + 2'd1;
      end
    end
  end

endmodule
