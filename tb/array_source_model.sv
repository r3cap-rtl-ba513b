// array_source_model: behavioural model of one 2x2 receiver array's analog
// path for testbenches; not synthesizable.
//
// A single narrow-band source at the intermediate frequency is sampled once
// per ADC frame; with 5.25 MHz sampled at 1 Msps the phase advances by pi/2
// per sample. Receiver i sees the phase offset phase_deg[i] (set by the
// direction of arrival) and an amplitude, in ADC codes, of
//   amp * 10^(gain_db / 20),  gain_db = GAIN_DB_PER_CODE * (dac1 + dac2 - 2*97)
// which stands for the two variable-gain amplifiers steered by the gain DACs.
// `value[i]` = round(128 + amplitude * cos(pi/2 n + phase)), clipped to
// 0..255, is updated at every rising cs_n for the next frame. `clipped_low`
// counts samples that hit code 0.
module array_source_model #(
  parameter real GAIN_DB_PER_CODE = 24.0 / 62.0
) (
  input  logic       cs_n,
  input  real        amp,
  input  real        phase_deg [4],
  input  logic [7:0] dac1 [4],
  input  logic [7:0] dac2 [4],
  output logic [7:0] value [4],
  output int         clipped_low
);
  int n = 0;

  initial begin
    clipped_low = 0;
    for (int i = 0; i < 4; i++) value[i] = 8'd128;
  end

  always @(posedge cs_n) begin
    real a, s, g;
    for (int i = 0; i < 4; i++) begin
      g = GAIN_DB_PER_CODE * (real'(dac1[i]) + real'(dac2[i]) - 194.0);
      a = amp * $pow(10.0, g / 20.0);
      s = 128.0 + a * $cos(3.14159265358979 / 2.0 * n + phase_deg[i] * 3.14159265358979 / 180.0);
      if (s < 0.5) begin
        value[i] = 8'd0;
        clipped_low++;
      end else if (s > 255.0) value[i] = 8'd255;
      else value[i] = 8'(int'(s));
    end
    n++;
  end
endmodule
