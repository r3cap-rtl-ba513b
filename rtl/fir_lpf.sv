// fir_lpf: anti-aliasing low-pass filter for one I or Q stream.
//
// Demodulation leaves the wanted signal around DC (|w| < pi/4) and an image
// at w = pi. This 22-tap direct-form FIR passes up to pi/3 and stops from
// pi/2 with about 50 dB attenuation. Inputs are 8-bit signed samples read as
// Q1.7 fractions, coefficients are Q1.15, so the exact sum has 22 fractional
// bits; the output keeps all 22 and 2 integer bits (24 bits), saturating in
// the unreachable case that the sum leaves that range.
//
// Interface and timing: on every `in_valid` the new sample enters the delay
// line; in the next clock the dot product of the delay line with the
// coefficients is formed combinationally and registered, so `y` and
// `out_valid` follow two clocks after `in_valid`. One sample arrives per microsecond, far slower than the
// clock, so a fully parallel filter is used for clarity. The delay line resets
// to zero.
//
// Tap count, word widths and band edges follow the system description. The
// coefficient values (r3cap_pkg::LPF_COEFS) are this design's own equiripple
// design for that specification, and the parallel structure is an own choice.
module fir_lpf
  import r3cap_pkg::*;
#(
  parameter int unsigned TAPS  = FIR_TAPS,
  parameter int unsigned IN_W  = ADC_W,
  parameter int unsigned CW    = COEF_W,
  parameter int unsigned OUT_W = IQ_W,
  parameter logic signed [CW-1:0] COEFS [TAPS] = LPF_COEFS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  input  logic                    in_valid,
  output logic signed [OUT_W-1:0] y,
  output logic                    out_valid
);

  localparam int unsigned ACC_W = IN_W + CW + $clog2(TAPS);
  localparam logic signed [ACC_W-1:0] Y_MAX = ACC_W'((longint'(1) <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] Y_MIN = ACC_W'(-(longint'(1) <<< (OUT_W - 1)));

  logic signed [IN_W-1:0]  dline [TAPS];
  logic signed [ACC_W-1:0] acc;
  logic                    fresh;   // delay line changed last clock

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++)
      acc += ACC_W'(dline[k]) * ACC_W'(COEFS[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) dline[k] <= '0;
      fresh     <= 1'b0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      fresh     <= in_valid;
      out_valid <= fresh;
      if (in_valid) begin
        dline[0] <= x;
        for (int k = 1; k < TAPS; k++) dline[k] <= dline[k-1];
      end
      if (fresh) begin
        if (acc > Y_MAX)      y <= OUT_W'(Y_MAX);
        else if (acc < Y_MIN) y <= OUT_W'(Y_MIN);
        else                  y <= OUT_W'(acc);
      end
    end
  end

endmodule
