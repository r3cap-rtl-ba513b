// adc_ctrl: shared serial interface controller for the 8-bit, 1 Msps
// ADS7040-style ADCs of one receiver array.
//
// All ADCs of an array share one chip select (cs_n) and one serial clock
// (sclk); each returns its data on its own sdo line. After reset the
// controller runs one start-up frame: cs_n low for STARTUP_SCLKS serial clock
// cycles (the converter needs at least 16). After that it runs one conversion
// frame every SAMPLE_CLKS fabric clocks: cs_n falls, FRAME_SCLKS (10)
// serial clock cycles follow, cs_n rises, and cs_n stays high for the rest of
// the sample period. Each converter shifts out two leading zeros and then D7
// down to D0, a new bit after every falling sclk edge; the controller samples
// sdo on the rising sclk edges, so rising edges 3 to 10 carry D7..D0. When
// cs_n rises the captured bytes move to `sample` and `valid` pulses for one
// clock, once per sample period.
//
// Timing: one serial clock period is SCLK_DIV fabric clocks, low for the first
// half and high for the second, so the default 5 gives a 20 MHz sclk from the
// 100 MHz clock and a 50-clock frame inside a 100-clock (1 us) sample period.
// sclk and cs_n are registered outputs. sdo is read one fabric clock after the
// rising sclk edge leaves the FPGA, while the ADC still holds the bit it
// presented after the previous falling edge.
//
// The frame shape, start-up length and bit order follow the converter timing
// described for the system; the shift register used to collect the bits
// (instead of one enabled flip-flop per bit), the sclk duty cycle and the
// exact position of the edges are this design's choices.
module adc_ctrl
  import r3cap_pkg::*;
#(
  parameter int unsigned N_ADC           = N_RX,
  parameter int unsigned SAMPLE_CLKS     = CLKS_PER_SAMPLE,
  parameter int unsigned SCLK_DIV        = 5,
  parameter int unsigned FRAME_SCLKS     = 10,
  parameter int unsigned STARTUP_SCLKS   = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // converter pins
  output logic                   cs_n,
  output logic                   sclk,
  input  logic [N_ADC-1:0]       sdo,
  // sample stream
  output logic [N_ADC-1:0][ADC_W-1:0] sample,
  output logic                   valid,
  output logic                   started      // start-up frame done
);

  localparam int unsigned CW       = $clog2(SAMPLE_CLKS);
  localparam int unsigned LOW_PH   = SCLK_DIV - SCLK_DIV / 2;  // clocks low
  localparam int unsigned FRAME_CL = FRAME_SCLKS * SCLK_DIV;
  localparam int unsigned START_CL = STARTUP_SCLKS * SCLK_DIV;

  // both frames, plus the cycles that raise cs_n, must fit in a period
  if (START_CL + 2 >= SAMPLE_CLKS || FRAME_CL + 2 >= SAMPLE_CLKS) begin : g_bad
    $error("adc_ctrl: frame longer than the sample period");
  end

  logic [CW-1:0] cnt;          // position inside the sample period
  logic          in_startup;   // first period after reset
  logic [CW-1:0] frame_len;
  logic          frame_act;    // counter inside the sclk window
  logic          cs_act;       // one clock longer, so cs_n rises after sclk falls
  logic          sclk_nxt;
  logic          sclk_q1;      // sclk as it was one clock earlier
  logic [N_ADC-1:0][FRAME_SCLKS-1:0] shreg;

  assign frame_len = in_startup ? CW'(START_CL) : CW'(FRAME_CL);
  assign frame_act = cnt < frame_len;
  assign cs_act    = cnt <= frame_len;

  always_comb begin
    sclk_nxt = 1'b0;
    if (frame_act && (cnt % CW'(SCLK_DIV)) >= CW'(LOW_PH)) sclk_nxt = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      in_startup <= 1'b1;
      cs_n       <= 1'b1;
      sclk       <= 1'b0;
      sclk_q1    <= 1'b0;
      shreg      <= '0;
      sample     <= '0;
      valid      <= 1'b0;
      started    <= 1'b0;
    end else begin
      valid   <= 1'b0;
      sclk    <= sclk_nxt;
      cs_n    <= !cs_act;
      sclk_q1 <= sclk;

      if (cnt == CW'(SAMPLE_CLKS - 1)) begin
        cnt        <= '0;
        in_startup <= 1'b0;
        started    <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end

      // rising sclk seen at the pins one clock ago: take the bit
      if (sclk && !sclk_q1 && !in_startup) begin
        for (int i = 0; i < N_ADC; i++)
          shreg[i] <= {shreg[i][FRAME_SCLKS-2:0], sdo[i]};
      end

      // cs_n has risen at the end of a conversion frame: publish the bytes
      if (!in_startup && cnt == frame_len + CW'(2)) begin
        for (int i = 0; i < N_ADC; i++) sample[i] <= shreg[i][ADC_W-1:0];
        valid <= 1'b1;
      end
    end
  end

endmodule
