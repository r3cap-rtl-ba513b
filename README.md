# R3CAP programmable-logic front end

This design tracks a small 915 MHz transmitter in three dimensions. Two
2x2 antenna arrays, one metre apart, each estimate the direction the signal
arrives from. The two directions are then intersected to get a position. The
direction finding uses MUSIC, which needs the spatial correlation matrix of
each array:

    R = (1/N) * sum over n of x[n] x[n]^H,   N = 1024

Here x[n] is the vector of complex baseband samples of the four receivers at
time n. This RTL is the part that runs on the FPGA. It covers:

- the serial ADCs: it drives them and collects their samples;
- turning the real IF samples into complex baseband;
- filtering;
- keeping each receiver's analog gain in range;
- building R for both arrays;
- handing R to the processor over AXI4-Lite.

MUSIC, peak search, triangulation and display run in software and are not
part of this RTL.

## Signal path of one array

```
            ADS7040 x4 (shared CS/SCLK)           DAC081S101 x8 (shared SYNC/SCLK)
                  |  sdo[3:0]                               ^ din[7:0]
             +----v-----+                              +----+-----+
             | adc_ctrl |  4 bytes / 1 us              | dac_ctrl |
             +----+-----+                              +----^-----+
                  |                                         | 8 gain codes / 50 us
     +------------v-----------------------------------------+------+
     | rx_chain x4                                                 |
     |   MSB flip -> iq_demod -> fir_lpf (I) ,  fir_lpf (Q)        |
     |          \-> agc (50-sample l1 norm, DAC1/DAC2 codes) ------+
     +------------+------------------------------------------------+
                  | 4 x (I,Q) 24-bit, Q2.22
             +----v-----+
             | autocorr |  10 entries, 2 x 56-bit each, every 1024 samples
             +----+-----+
                  |
             +----v-----+
             | axi_regs |  36 x 32-bit words  <---> processor
             +----------+
```

`ragc` is one array: `adc_ctrl`, four `rx_chain`, `autocorr` and `dac_ctrl`.
`r3cap_fpga` holds two `ragc` cores, each with its own `axi_regs`. Each
array's AXI4-Lite slave port is a top-level port. Everything runs on one
100 MHz clock with an active-low asynchronous reset.

| file | what it is |
|---|---|
| `rtl/r3cap_pkg.sv` | constants, filter coefficients, I/Q and entry types, AXI4-Lite structs, small helpers |
| `rtl/adc_ctrl.sv` | ADC serial controller: start-up frame, 10-clock conversion frames, bit capture |
| `rtl/iq_demod.sv` | multiplier-free fs/4 quadrature demodulator |
| `rtl/fir_lpf.sv` | 22-tap low-pass FIR, 8-bit in, 24-bit out |
| `rtl/agc.sv` | gain control of one receiver |
| `rtl/dac_ctrl.sv` | writes the eight gain codes as 16-bit DAC frames |
| `rtl/rx_chain.sv` | one receiver: DC removal, demodulator, two filters, AGC |
| `rtl/autocorr.sv` | correlation matrix accumulator |
| `rtl/axi_regs.sv` | AXI4-Lite read-out registers |
| `rtl/ragc.sv` | one array |
| `rtl/r3cap_fpga.sv` | top: two arrays |

## Demodulation without multipliers

The analog front end mixes the 915 MHz carrier down to a 5.25 MHz IF. The
ADCs sample it at only 1 MHz. Because 5.25 MHz is 5 x 1 MHz + 250 kHz, the
undersampled signal appears at 250 kHz, a quarter of the sample rate: exactly
four samples per cycle. Bringing that to baseband means multiplying by
exp(-j*pi*n/2). That sequence is only
ever 1, -j, -1 and j, so each product is the sample itself, negated, or moved
between I and Q. `iq_demod` runs a 2-bit counter that advances once per
sample:

| state | I | Q |
|---|---|---|
| 0 | x | 0 |
| 1 | 0 | -x |
| 2 | -x | 0 |
| 3 | 0 | x |

Negation saturates, because -(-128) does not fit in 8 bits; it gives +127.
Before the demodulator, the ADC's offset-binary code has 128 subtracted.
That is the same as inverting its most significant bit, so it costs no
logic.

Half of the I and Q samples are zero, so the demodulated signal has images
around fs/2. The low-pass filter removes them. It passes up to pi/3 rad/sample
and stops from pi/2 with about 50 dB of attenuation. It also removes the
residual DC, which the mixer moves to fs/4. The 22 coefficients in
`r3cap_pkg::LPF_COEFS` are an equiripple design for those band edges, with a
stop-band weight of 20, rounded to 16 bits with 15 fraction bits. Measured
after rounding:

- stop band: 50.3 dB;
- pass-band ripple: about 1 dB;
- DC gain: 0.94 (sum of the coefficients 30830 / 32768).

To change the filter, replace that table. The FIR is a plain parallel direct
form, and its width adapts to the table.

## Fixed-point formats

| signal | width | format |
|---|---|---|
| ADC byte | 8 | unsigned offset binary |
| after DC removal, demodulator | 8 | signed, read as Q1.7 by the filter |
| coefficients | 16 | Q1.15 |
| filter output I, Q | 24 | signed, 22 fraction bits (Q2.22), saturated |
| product x_i * conj(x_j), per part | 48+1 | 44 fraction bits |
| matrix entry part | 56 | signed, 44 fraction bits |

**Averaging.** `autocorr` averages without a divider. Each part of each
product is shifted right arithmetically by 10 bits (that is, divided by 1024,
rounding down) before it is added. After 1024 samples the sum is already the
average. A 56-bit part cannot overflow: each shifted term is below 2^39 in
magnitude, and 1024 of them stay below 2^49.

**Entry layout.** An entry is 112 bits, `{re[55:0], im[55:0]}`: the real part
is in the upper half.

**Entry order.** The ten entries are the upper triangle, row by row:

    r11 r12 r13 r14 r22 r23 r24 r33 r34 r44

Here rij = mean(x_i * conj(x_j)). The lower triangle is the conjugate of the
upper one, so software rebuilds it.

**Converting to a real number.** Divide a part by 2^44.

## Gain control

Each receiver has two cascaded variable-gain amplifiers. Each amplifier is
set by an 8-bit DAC code in 97..159, which is about 1.9 V to 3.1 V of control
voltage. Each code step changes the gain by about 0.4 dB. `agc` adds up
|x - 128| over 50 samples, so it makes one decision every 50 us:

- **Sum below 3150:** the signal is too weak. Raise DAC2 by one code. If
  DAC2 is at 159, raise DAC1 instead.
- **Sum above 4550:** the signal is too strong. Lower DAC1 by one code. If
  DAC1 is at 97, lower DAC2 instead.
- **Otherwise:** hold.

DAC2 is raised first and DAC1 is lowered first. This keeps as much gain as
possible in the second stage, which sits after the first stage's filtering.

Both codes start at 97, which is minimum gain. All four receivers make their
decision in the same clock, because they count the same ADC strobes. After
each decision `ragc` sends all eight codes to the DACs, which takes 0.7 us.
Going from minimum to maximum gain takes 124 steps, which is 6.2 ms.

The window of 50 is long enough to smooth out the signal's own 250 kHz
swing. It is short enough that the gain settles in a few matrix periods.

## Serial interfaces

**ADCs (`adc_ctrl`)** share one CS_n and one SCLK; each has its own SDO line.

- **Start-up:** after reset, one frame with CS_n low for 16 SCLK cycles and
  no data taken.
- **Conversion frames:** one every 100 clocks (1 us), each with 10 SCLK
  cycles at 20 MHz.
- **Data:** the ADC sends two zeros and then D7..D0. Each bit changes after
  a falling SCLK edge. SDO is sampled on the rising edges, one fabric clock
  after SCLK goes high at the pin.
- **Output:** 2 clocks after CS_n rises, the bytes appear on `sample` with a
  one-clock `valid` pulse.

**DACs (`dac_ctrl`)** share one SYNC_n and one SCLK; each has its own DIN
line.

- **Frame:** 16 bits, MSB first: `0000 cccccccc 0000`. That is two unused
  bits, power-down mode 00 (normal operation), the 8-bit code and four
  don't-care bits.
- **Timing:** SCLK runs at 25 MHz and idles high. DIN changes on rising
  edges and is stable at the falling edge, where the DAC takes it. SYNC_n is
  low for the 64 clocks of a frame.
- **Requests:** a request that arrives during a frame is held and sent next.

## Register map (per array, AXI4-Lite, 32-bit)

| byte address | word | content |
|---|---|---|
| 0x00 | 0 | bit 0: a new matrix is ready. Write 1 to bit 0 to clear it. |
| 0x04..0x8C | 1..35 | the 1120-bit string {r44, ..., r12, r11}, least significant word first. Word k holds bits 32(k-1)+31..32(k-1). |

Reading a word past 35 returns SLVERR. Writes to words other than 0 are
ignored, and every write is answered OKAY.

A new matrix overwrites the whole bank every 1.024 ms. It also pulses
`r_new`, which the top brings out and which can serve as an interrupt. Read
the whole bank within 1.024 ms of `r_new`, or the words may come from two
different matrices.

To decode entry e (0..9) of a read bank: take bits 112e..112e+111 of the
1120-bit string. The real part is the upper 56 bits of that slice.

Each AXI channel has one transaction in flight at a time:

- a read is answered in the clock after the address is accepted;
- a write needs address and data together.

## Latency and rates

| event | clocks (100 MHz) |
|---|---|
| conversion frame | 50 of a 100-clock period |
| CS_n rising to `valid` | 2 |
| `valid` to filtered I/Q | 3 (demodulator 1, filter 2) |
| last sample of a block to `r_new` | 2 |
| matrix period | 102 400 (1.024 ms) |
| AGC decision period | 5 000 (50 us) |
| DAC write of 8 codes | about 70 |

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints a line
`TB_RESULT checks=N failures=M` and stops. Each has a watchdog. The
behavioural models in `tb/` stand in for the external parts:

- `ads7040_model`: the serial ADC;
- `dac081s101_model`: the serial DAC; it decodes frames and counts them;
- `array_source_model`: a tone at each receiver at a quarter of the sample
  rate, which is where the IF lands after sampling. Each receiver has its
  own phase, and the amplitude follows the current gain codes; the
  model clips at the ADC range.

With plain Verilator, for example:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/r3cap_pkg.sv tb/tb_r3cap_fpga.sv --top-module tb_r3cap_fpga
./obj_dir/Vtb_r3cap_fpga
```

The testbenches write their delays in nanoseconds and declare no timescale
of their own, so keep `--timescale 1ns/1ps`. Swap the testbench name to run
another one. The package must come first on the command line; the rest is
found through `-y`.

`tb_r3cap_fpga` runs the unmodified top, with every parameter at its default,
for about 4.2 ms of device time. That is about one second of wall time.
Both arrays start at minimum gain, each with its own source and its own set
of per-receiver phases:

- array 0 sees a weak source;
- array 1 sees a weak source that becomes strong enough after 1.5 ms to
  clip the ADCs.

It checks:

- that the AGC raises the gain of the weak source into its band and holds
  it there;
- that the AGC lowers the gain of the clipping source to its floor;
- that every DAC frame carries the code the AGC chose;
- that matrices arrive every 1.024 ms on both arrays;
- that the matrices read back over AXI4-Lite equal the ones inside the
  cores;
- that the phases of the off-diagonal entries match the differences of the
  source's per-receiver phases, once the gain has settled and the block is not clipped;
- that the ready flag sets and clears.

It counts raise, lower, hold and limit events, DAC frames, matrices and
ready-flag clears, and fails if any of them never happened.

`tb_agc_worst_case` repeats the slowest gain change on one array core, with
the ADC and DAC models at its pins. A full-rail input first holds the gain
at its minimum. Then a weak input follows, and the test checks every DAC
write until the gain is at its maximum. It measures 124 windows, 6.200 ms.

The other testbenches check each block against a reference computed in the
testbench. Among them:

- the FIR against a direct convolution;
- the correlator against a 64-bit reference sum;
- the AGC against a model of the decision rule;
- the ADC and DAC controllers against the pin-level models, including the
  frame timing.

## Where this departs from the original system, and why

- **Demodulation sign.** The demodulator multiplies by exp(-j*pi*n/2), as its
  state table does. The original prose writes the factor with a positive
  exponent, which disagrees with its own state table. A positive exponent
  would give Q the opposite sign and mirror all matrix phases.
- **Pins per array: 16.** These are 4 SDO lines, CS_n and SCLK for the ADCs,
  and SCLK, SYNC_n and 8 DIN lines for the DACs. The original's count of 12
  pins per array cannot carry eight separate DAC data lines.
- **Serial clocks.** They come from counters on the 100 MHz clock, not from
  clock-manager outputs. This design picks the SCLK rates: 20 MHz for the
  ADCs and 25 MHz for the DACs.
- **FIR.** The original used a vendor FIR core. This one is plain RTL with
  its own coefficients, because the original coefficients were not
  published. It has two clocks of latency and starts from an all-zero delay
  line.
- **Complex products.** They are written as plain multiplies, not with a
  vendor complex-multiplier core.
- **DAC code limits: 97 and 159.** These match the stated 1.9 V and 3.1 V
  control-voltage range. The original firmware used 92 and 164.
- **AGC thresholds: 3150 and 4550.** These are the firmware values. A plot
  of the original behaviour suggests a band of about 3175 to 4500.
- **Register layout.** The bit packing, the write-1-to-clear ready flag and
  the SLVERR on out-of-range reads are this design's choices.
- **Entry layout.** The real part is in the upper 56 bits, which matches how
  the host software unpacks the entries. Entries have 44 fraction bits. The
  software scale of 2^43 in the original would give values twice too large.
- **Reset.** A reset is added everywhere. The original relied on
  initial values.
- **Gain adaptation time.** Full-range adaptation takes 6.2 ms at one code
  per 50 us, which is longer than the original's estimate of about 2 ms.

## Limits

- **Untested against hardware.** Nothing here has run on an FPGA. The
  pin-level timing of the ADC and DAC controllers follows the usual
  behaviour of these converter types; check it against the datasheets, and
  the board's IO constraints, before use.
- **Array size.** Four receivers per array are built in through `N_RX` in
  the package. The correlator takes any N, but the ADC controller, register
  bank and DAC line count are sized from the package. A 3x3 array would need
  45 entries and a larger register bank.
- **Behaviour at the limits of the AGC range.** When a signal is clipped,
  the 3rd harmonic folds onto the wanted tone and distorts the phase. The
  AGC pulls the gain down within a few windows, but a matrix taken during
  that time has wrong phases. At the bottom of the gain range (both codes at
  97), the AGC can do nothing more against a signal that is too strong.
- **The first matrix after reset** includes the filters' start-up.
