// r3cap_pkg: constants, types and small arithmetic helpers shared by the
// R3CAP angle-of-arrival front-end logic.
//
// The numbers follow the system description: a 100 MHz fabric clock, 8-bit
// ADC samples at 1 Msps (100 clocks per sample), 4 receivers per array and two
// arrays, 24-bit I/Q values with 22 fractional bits after the low-pass filter,
// 56-bit real and imaginary parts with 44 fractional bits per matrix entry,
// averaging over 1024 samples, an AGC window of 50 samples and gain DAC codes
// between 97 and 159.
//
// Own choices: the 22 filter coefficients (the original ones came from a
// filter-design tool and are not published) were designed here for the same
// specification: pass band edge pi/3, stop band edge pi/2, at least 50 dB stop
// band attenuation, 16-bit coefficients with 15 fractional bits. They are an
// equiripple (Parks-McClellan) design with stop band weight 20, rounded to
// Q1.15: about 50.3 dB attenuation, 1 dB pass band ripple, DC gain 0.94.
// The AXI4-Lite bundles are plain structs so that they can be top-level ports.
// COEF_FRAC, IQ_FRAC and PART_FRAC name the binary point of each format for
// readers and testbenches; no logic needs them, because the point only moves
// by whole products and shifts that the widths already fix.
package r3cap_pkg;

  // ---------------------------------------------------------------- rates
  localparam int unsigned CLK_HZ          = 100_000_000;
  localparam int unsigned SAMPLE_HZ       = 1_000_000;
  localparam int unsigned CLKS_PER_SAMPLE = CLK_HZ / SAMPLE_HZ;   // 100

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_RX       = 4;    // receivers per array (2x2)
  localparam int unsigned N_ARRAYS   = 2;
  localparam int unsigned ADC_W      = 8;
  localparam int unsigned COEF_W     = 16;
  localparam int unsigned COEF_FRAC  = 15;
  localparam int unsigned FIR_TAPS   = 22;
  localparam int unsigned IQ_W       = 24;   // filter output, 22 fraction bits
  localparam int unsigned IQ_FRAC    = 22;
  localparam int unsigned PART_W     = 56;   // real or imaginary part of R
  localparam int unsigned PART_FRAC  = 44;
  localparam int unsigned ENTRY_W    = 2 * PART_W;   // 112
  localparam int unsigned N_ENTRIES  = N_RX * (N_RX + 1) / 2;   // 10
  localparam int unsigned N_AVG      = 1024;
  localparam int unsigned N_DAC      = 2 * N_RX; // two gain DACs per receiver

  // ---------------------------------------------------------------- AGC
  localparam int unsigned AGC_WINDOW = 50;
  localparam int unsigned AGC_LOW    = 3150;
  localparam int unsigned AGC_HIGH   = 4550;
  localparam int unsigned DAC_MIN    = 97;
  localparam int unsigned DAC_MAX    = 159;

  // ---------------------------------------------------------------- FIR
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_arr_t [FIR_TAPS];
  localparam coef_arr_t LPF_COEFS = '{
    -16'sd209,  -16'sd673,  -16'sd705,    16'sd95,  16'sd1124,   16'sd768,
    -16'sd1256, -16'sd2526,   16'sd130,  16'sd6534, 16'sd12133, 16'sd12133,
     16'sd6534,   16'sd130, -16'sd2526, -16'sd1256,   16'sd768,  16'sd1124,
       16'sd95,  -16'sd705,  -16'sd673,  -16'sd209
  };

  // ---------------------------------------------------------------- types
  typedef logic signed [ADC_W-1:0] sample_t;

  typedef struct packed {
    logic signed [IQ_W-1:0] re;   // I
    logic signed [IQ_W-1:0] im;   // Q
  } iq_t;

  // Matrix entry, real part in the upper 56 bits, imaginary in the lower 56.
  typedef struct packed {
    logic signed [PART_W-1:0] re;
    logic signed [PART_W-1:0] im;
  } entry_t;

  // AXI4-Lite, 32-bit data, 8-bit byte address (36 words fit).
  localparam int unsigned AXI_AW = 8;
  typedef struct packed {
    logic              awvalid;
    logic [AXI_AW-1:0] awaddr;
    logic              wvalid;
    logic [31:0]       wdata;
    logic [3:0]        wstrb;
    logic              bready;
    logic              arvalid;
    logic [AXI_AW-1:0] araddr;
    logic              rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic        bvalid;
    logic [1:0]  bresp;
    logic        arready;
    logic        rvalid;
    logic [31:0] rdata;
    logic [1:0]  rresp;
  } axil_rsp_t;

  // ---------------------------------------------------------------- helpers
  // The ADC codes are offset binary centred on 128; subtracting 128 is the
  // same as inverting the most significant bit.
  function automatic sample_t dc_remove(input logic [ADC_W-1:0] raw);
    return sample_t'({~raw[ADC_W-1], raw[ADC_W-2:0]});
  endfunction

  // Two's complement negation that maps the one value without a negative,
  // -128, to +127.
  function automatic sample_t neg_sat(input sample_t x);
    if (x == sample_t'(-128)) return sample_t'(127);
    return -x;
  endfunction

  // Magnitude of a signed sample, 0..128, as an unsigned 8-bit number.
  function automatic logic [ADC_W-1:0] abs_val(input sample_t x);
    return x[ADC_W-1] ? ADC_W'(-x) : ADC_W'(x);
  endfunction

endpackage
