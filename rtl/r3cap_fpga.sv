// r3cap_fpga: programmable-logic top of the two-array RF direction finder.
//
// Two identical 2x2 receiver arrays, one metre apart, each deliver four
// intermediate-frequency signals to serial ADCs. For every array a ragc core
// samples the four ADCs in lock step, demodulates and filters each to
// baseband I/Q, keeps each receiver's analog gain in range through its two
// gain DACs, and builds the array's 4x4 spatial correlation matrix averaged
// over 1024 samples. An axi_regs bank per array lets the processor read the
// matrix (36 32-bit words at byte addresses 0..0x8C). The processor, its AXI
// interconnect and the host software that turns the two matrices into
// directions of arrival and a 3D position are outside this design; each
// array's AXI4-Lite slave port is brought out instead.
//
// Clocking: everything runs on the 100 MHz board clock with an active-low
// asynchronous reset; the ADC and DAC serial clocks are generated from it by
// counters (the original used clock managers for them). Rates: one sample per
// receiver per microsecond, a new matrix per array every 1.024 ms, a gain
// update every 50 us.
//
// Notes for lint and synthesis reports: the gain codes, AGC decisions and
// norms that each ragc core reports are not read here (the processor reads
// only the matrix), so they show up as unused signals; they are kept because
// the testbench observes them. The write response is always OKAY, so the two
// bresp bits of each port are constant. The assertions inside the sub-blocks
// are disabled during reset, which a lint tool reports as the reset net being
// used both asynchronously and synchronously; it has no effect on the logic.
module r3cap_fpga
  import r3cap_pkg::*;
(
  input  logic                                    clk,
  input  logic                                    rst_n,
  // per array: ADC pins
  output logic      [N_ARRAYS-1:0]                adc_cs_n,
  output logic      [N_ARRAYS-1:0]                adc_sclk,
  input  logic      [N_ARRAYS-1:0][N_RX-1:0]      adc_sdo,
  // per array: gain DAC pins
  output logic      [N_ARRAYS-1:0]                dac_sclk,
  output logic      [N_ARRAYS-1:0]                dac_sync_n,
  output logic      [N_ARRAYS-1:0][N_DAC-1:0]     dac_din,
  // per array: AXI4-Lite slave port to the processor
  input  axil_req_t [N_ARRAYS-1:0]                axi_req,
  output axil_rsp_t [N_ARRAYS-1:0]                axi_rsp,
  // per array: new-matrix strobe, usable as an interrupt
  output logic      [N_ARRAYS-1:0]                r_new
);

  for (genvar a = 0; a < N_ARRAYS; a++) begin : g_array
    entry_t [N_ENTRIES-1:0]   r;
    logic [N_DAC-1:0][7:0]    gain;
    logic [N_RX-1:0]          agc_raise, agc_lower;
    logic [N_RX-1:0][15:0]    agc_norm;

    ragc u_ragc (
      .clk, .rst_n,
      .adc_cs_n   (adc_cs_n[a]),
      .adc_sclk   (adc_sclk[a]),
      .adc_sdo    (adc_sdo[a]),
      .dac_sclk   (dac_sclk[a]),
      .dac_sync_n (dac_sync_n[a]),
      .dac_din    (dac_din[a]),
      .r          (r),
      .r_new      (r_new[a]),
      .gain       (gain),
      .agc_raise  (agc_raise),
      .agc_lower  (agc_lower),
      .agc_norm   (agc_norm)
    );

    axi_regs u_regs (
      .clk, .rst_n,
      .r     (r),
      .r_new (r_new[a]),
      .req   (axi_req[a]),
      .rsp   (axi_rsp[a])
    );
  end

endmodule
