// autocorr: spatial correlation matrix of one receiver array, averaged over
// N_AVG (1024) samples.
//
// For the N (4) baseband samples x_i = I_i + jQ_i of one time step the block
// forms the outer product R_n(i,j) = x_i * conj(x_j). The matrix is
// Hermitian, so only the N(N+1)/2 = 10 entries with i <= j are computed, in
// the order r11 r12 r13 r14 r22 r23 r24 r33 r34 r44. Each product of two
// 24-bit values with 22 fractional bits has 44 fractional bits; it is
// sign-extended to 56 bits per real and imaginary part, divided by 1024 by an
// arithmetic right shift (so the running sum cannot overflow) and added to an
// accumulator. After N_AVG samples the sums, that is the average, are copied
// to the output `r` and `r_new` pulses; the accumulators restart from zero
// with the next sample, so a new matrix appears every N_AVG samples
// (1.024 ms at 1 Msps) and `r` holds the last one until then.
//
// Each entry is 112 bits: real part in bits 111..56, imaginary part in bits
// 55..0, both two's complement with 44 fractional bits.
//
// Timing: the products are registered one clock after `in_valid`, the
// accumulators one clock later; `r_new` and the new `r` appear two clocks
// after the `in_valid` of the last sample of a block. The arithmetic (upper
// triangle only, conjugation by negating Q, 56-bit parts, division by shifting
// before adding) follows the system description; the two-stage pipeline is
// this design's choice (the original used vendor complex multipliers).
module autocorr
  import r3cap_pkg::*;
#(
  parameter int unsigned N     = N_RX,
  parameter int unsigned NAVG  = N_AVG,
  parameter int unsigned W     = IQ_W,
  parameter int unsigned PW    = PART_W,
  parameter int unsigned NE    = N * (N + 1) / 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  iq_t  [N-1:0]       x,
  input  logic               in_valid,
  output entry_t [NE-1:0]    r,
  output logic               r_new
);

  localparam int unsigned SHIFT = $clog2(NAVG);
  localparam int unsigned CW    = $clog2(NAVG) + 1;

  if (W != IQ_W || PW != PART_W) begin : g_bad
    $error("autocorr: word widths are fixed by r3cap_pkg");
  end
  if ((1 << SHIFT) != NAVG) begin : g_bad_navg
    $error("autocorr: NAVG must be a power of two");
  end

  entry_t [NE-1:0] prod_d, prod;
  entry_t [NE-1:0] acc;
  logic            prod_valid;
  logic [CW-1:0]   cnt;

  // outer product, upper triangle
  always_comb begin
    int e;
    e = 0;
    for (int i = 0; i < N; i++) begin
      for (int j = i; j < N; j++) begin
        // (a + jb)(c - jd) = (ac + bd) + j(bc - ad)
        prod_d[e].re = PW'(x[i].re) * PW'(x[j].re) + PW'(x[i].im) * PW'(x[j].im);
        prod_d[e].im = PW'(x[i].im) * PW'(x[j].re) - PW'(x[i].re) * PW'(x[j].im);
        e++;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod       <= '0;
      prod_valid <= 1'b0;
      acc        <= '0;
      r          <= '0;
      r_new      <= 1'b0;
      cnt        <= '0;
    end else begin
      prod_valid <= in_valid;
      r_new      <= 1'b0;
      if (in_valid) prod <= prod_d;
      if (prod_valid) begin
        if (cnt == CW'(NAVG - 1)) begin
          cnt   <= '0;
          r_new <= 1'b1;
          for (int e = 0; e < NE; e++) begin
            r[e].re   <= acc[e].re + (prod[e].re >>> SHIFT);
            r[e].im   <= acc[e].im + (prod[e].im >>> SHIFT);
            acc[e]    <= '0;
          end
        end else begin
          cnt <= cnt + 1'b1;
          for (int e = 0; e < NE; e++) begin
            acc[e].re <= acc[e].re + (prod[e].re >>> SHIFT);
            acc[e].im <= acc[e].im + (prod[e].im >>> SHIFT);
          end
        end
      end
    end
  end

endmodule
