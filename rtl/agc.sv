// agc: automatic gain control decision for one receiver chain.
//
// Each receiver has two cascaded variable-gain amplifiers, each set by an
// 8-bit DAC code. Over a window of WINDOW (50) samples the block sums the
// magnitude of the DC-free samples (the l1 norm). At the end of the window it
// compares the sum with two bounds:
//   sum < LOW : raise the gain by one code, the second amplifier (DAC2) first
//               until it reaches DAC_MAX, then the first (DAC1);
//   sum > HIGH: lower the gain by one code, the first amplifier (DAC1) first
//               until it reaches DAC_MIN, then the second (DAC2);
//   otherwise : keep both codes.
// Raising the second stage first keeps the first stage from driving it into
// compression. When both codes are at their limit nothing changes.
//
// Interface and timing: `raw` is the offset-binary ADC byte with `in_valid`
// (once per 1 us sample). `dac1`, `dac2` are the current codes; `update`
// pulses for one clock after every window, one clock after the last sample of
// the window, whether or not a code changed, and is used to start a DAC write.
// `raise`, `lower` flag the decision with `update`. `norm` holds the last
// window's sum. Both codes reset to DAC_MIN (lowest gain).
//
// Window length, the bounds' role, the update order and the DAC limits follow
// the system description; the bound values 3150 and 4550 come from the
// original implementation and the reset codes are this design's choice.
module agc
  import r3cap_pkg::*;
#(
  parameter int unsigned WINDOW = AGC_WINDOW,
  parameter int unsigned LOW    = AGC_LOW,
  parameter int unsigned HIGH   = AGC_HIGH,
  parameter int unsigned DMIN   = DAC_MIN,
  parameter int unsigned DMAX   = DAC_MAX
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ADC_W-1:0] raw,
  input  logic             in_valid,
  output logic [7:0]       dac1,
  output logic [7:0]       dac2,
  output logic             update,
  output logic             raise,
  output logic             lower,
  output logic [15:0]      norm
);

  localparam int unsigned NW = $clog2(WINDOW);

  logic [15:0]   sum;
  logic [NW-1:0] n;
  logic [15:0]   total;

  // sum including the sample arriving now
  assign total = sum + 16'(abs_val(dc_remove(raw)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum    <= '0;
      n      <= '0;
      norm   <= '0;
      dac1   <= 8'(DMIN);
      dac2   <= 8'(DMIN);
      update <= 1'b0;
      raise  <= 1'b0;
      lower  <= 1'b0;
    end else begin
      update <= 1'b0;
      raise  <= 1'b0;
      lower  <= 1'b0;
      if (in_valid) begin
        if (n == NW'(WINDOW - 1)) begin
          n      <= '0;
          sum    <= '0;
          norm   <= total;
          update <= 1'b1;
          if (total < 16'(LOW)) begin
            raise <= 1'b1;
            if (dac2 < 8'(DMAX))      dac2 <= dac2 + 8'd1;
            else if (dac1 < 8'(DMAX)) dac1 <= dac1 + 8'd1;
          end else if (total > 16'(HIGH)) begin
            lower <= 1'b1;
            if (dac1 > 8'(DMIN))      dac1 <= dac1 - 8'd1;
            else if (dac2 > 8'(DMIN)) dac2 <= dac2 - 8'd1;
          end
        end else begin
          n   <= n + 1'b1;
          sum <= total;
        end
      end
    end
  end

endmodule
