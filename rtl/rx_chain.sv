// rx_chain: digital processing of one receiver: DC removal, quadrature
// demodulation, anti-aliasing filtering and gain control.
//
// The ADC byte is offset binary around mid-rail, so inverting its top bit
// turns it into a signed sample. The signed sample goes through iq_demod,
// which splits it into baseband I and Q, and each of I and Q goes through its
// own 22-tap fir_lpf. In parallel, the agc block watches the same samples and
// adjusts the receiver's two gain DAC codes every 50 samples.
//
// Interface and timing: `raw`/`in_valid` come once per 1 us sample from the
// ADC controller. `iq` (24-bit I and Q, 22 fractional bits each) is valid
// with `out_valid`, three clocks after `in_valid` (one in the demodulator,
// two in the filter). `dac1`, `dac2`, `agc_update` and the window's l1 norm
// `agc_norm` come from the agc block. The split into these stages follows the system description.
module rx_chain
  import r3cap_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ADC_W-1:0] raw,
  input  logic             in_valid,
  output iq_t              iq,
  output logic             out_valid,
  output logic [7:0]       dac1,
  output logic [7:0]       dac2,
  output logic             agc_update,
  output logic             agc_raise,
  output logic             agc_lower,
  output logic [15:0]      agc_norm
);

  sample_t xi, xq;
  logic    demod_valid, q_valid;

  iq_demod u_demod (
    .clk, .rst_n,
    .x        (dc_remove(raw)),
    .in_valid (in_valid),
    .xi, .xq,
    .out_valid(demod_valid)
  );

  fir_lpf u_lpf_i (
    .clk, .rst_n,
    .x (xi), .in_valid (demod_valid),
    .y (iq.re), .out_valid (out_valid)
  );

  fir_lpf u_lpf_q (
    .clk, .rst_n,
    .x (xq), .in_valid (demod_valid),
    .y (iq.im), .out_valid (q_valid)
  );

  agc u_agc (
    .clk, .rst_n,
    .raw, .in_valid,
    .dac1, .dac2,
    .update (agc_update),
    .raise  (agc_raise),
    .lower  (agc_lower),
    .norm   (agc_norm)
  );

  // both filters see the same strobe, so their outputs are always aligned
  a_iq_aligned: assert property (@(posedge clk) disable iff (!rst_n) out_valid == q_valid);

endmodule
