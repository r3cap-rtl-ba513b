// ragc: processing core of one 2x2 receiver array: sampling, demodulation,
// filtering, gain control and correlation matrix generation.
//
// One adc_ctrl clocks the four serial ADCs of the array together, so all four
// receivers are sampled at the same instant once per microsecond (the phase
// relation between them is what the direction finding needs). Each sample
// byte goes to its receiver's rx_chain, which produces baseband I/Q and runs
// that receiver's gain control. The four I/Q streams feed autocorr, which
// publishes the 10 upper-triangle entries of the averaged 4x4 correlation
// matrix every 1024 samples. Whenever the gain controls finish a 50-sample
// window, dac_ctrl writes the eight gain codes (two per receiver) to the
// array's DACs over one shared sclk/sync_n and eight data lines.
//
// DAC line order: din[2*i] drives the first-stage (DAC1) gain of receiver i,
// din[2*i+1] its second-stage (DAC2) gain; `gain` uses the same order.
// Timing: `r`/`r_new` as in autocorr, five clocks after the ADC frame that
// completed the block. The partitioning follows the system description; the
// DAC line order is this design's choice.
module ragc
  import r3cap_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  // ADC pins
  output logic                       adc_cs_n,
  output logic                       adc_sclk,
  input  logic [N_RX-1:0]            adc_sdo,
  // DAC pins
  output logic                       dac_sclk,
  output logic                       dac_sync_n,
  output logic [N_DAC-1:0]           dac_din,
  // correlation matrix
  output entry_t [N_ENTRIES-1:0]     r,
  output logic                       r_new,
  // gain state, for monitoring
  output logic [N_DAC-1:0][7:0]      gain,
  output logic [N_RX-1:0]            agc_raise,
  output logic [N_RX-1:0]            agc_lower,
  output logic [N_RX-1:0][15:0]      agc_norm
);

  logic [N_RX-1:0][ADC_W-1:0] raw;
  logic                       raw_valid;
  logic                       adc_started;
  iq_t  [N_RX-1:0]            iq;
  logic [N_RX-1:0]            iq_valid;
  logic [N_RX-1:0]            agc_update;
  logic                       dac_busy;

  adc_ctrl u_adc (
    .clk, .rst_n,
    .cs_n    (adc_cs_n),
    .sclk    (adc_sclk),
    .sdo     (adc_sdo),
    .sample  (raw),
    .valid   (raw_valid),
    .started (adc_started)
  );

  for (genvar i = 0; i < N_RX; i++) begin : g_rx
    rx_chain u_rx (
      .clk, .rst_n,
      .raw        (raw[i]),
      .in_valid   (raw_valid),
      .iq         (iq[i]),
      .out_valid  (iq_valid[i]),
      .dac1       (gain[2*i]),
      .dac2       (gain[2*i+1]),
      .agc_update (agc_update[i]),
      .agc_raise  (agc_raise[i]),
      .agc_lower  (agc_lower[i]),
      .agc_norm   (agc_norm[i])
    );
  end

  autocorr u_corr (
    .clk, .rst_n,
    .x        (iq),
    .in_valid (iq_valid[0]),
    .r, .r_new
  );

  dac_ctrl u_dac (
    .clk, .rst_n,
    .load   (agc_update[0]),
    .codes  (gain),
    .busy   (dac_busy),
    .sclk   (dac_sclk),
    .sync_n (dac_sync_n),
    .din    (dac_din)
  );

  // every receiver is strobed by the same ADC frame
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               iq_valid == {N_RX{iq_valid[0]}} &&
                               agc_update == {N_RX{agc_update[0]}});
  // no sample before the converters have had their start-up frame
  a_started: assert property (@(posedge clk) disable iff (!rst_n) raw_valid |-> adc_started);
  // a DAC write (about 66 clocks) ends long before the next window (5000)
  a_dac_free: assert property (@(posedge clk) disable iff (!rst_n) agc_update[0] |-> !dac_busy);

endmodule
