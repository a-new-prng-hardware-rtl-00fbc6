// prng_pkg: constants shared by the exponential-map PRNG.
//
// The map x(n+1) = lambda * x(n) * exp(-x(n)) is evaluated with exp(-x)
// replaced by its Maclaurin polynomial of degree N_TERMS = 20, whose
// coefficients are a_k = (-1)^k / k!.  Two number formats are used:
//   * binary32 (IEEE-754 single precision): the coefficient table below
//     holds a_k rounded to the nearest binary32 value;
//   * fixed point with 63 fraction bits: the coefficients are computed at
//     elaboration as (-1)^k * floor(2^63 / k!), held in a signed 66-bit
//     word (sign, two integer bits, 63 fraction bits).
// lambda = 17.4 and n = 20 follow the source design; the fixed-point
// coefficient rounding (truncation) is this design's choice.
package prng_pkg;

  localparam int unsigned N_TERMS = 20;       // degree of the polynomial
  localparam int unsigned N_SAMPLES = 100000; // samples per run
  // clock cycles per sample: N_TERMS Horner steps, Register 1, Register 2
  localparam int unsigned SAMPLE_CYCLES = N_TERMS + 2;

  // ---------------- binary32 ----------------
  typedef logic [31:0] fp32_t;

  // a_k = (-1)^k / k!, k = 0..20, rounded to nearest even binary32
  localparam fp32_t FP_COEF [0:20] = '{
    32'h3f800000, 32'hbf800000, 32'h3f000000, 32'hbe2aaaab, 32'h3d2aaaab,
    32'hbc088889, 32'h3ab60b61, 32'hb9500d01, 32'h37d00d01, 32'hb638ef1d,
    32'h3493f27e, 32'hb2d7322b, 32'h310f76c7, 32'haf309231, 32'h2d49cba5,
    32'hab573f9f, 32'h29573f9f, 32'ha74a963c, 32'h253413c3, 32'ha317a4da,
    32'h20f2a15d
  };

  localparam fp32_t FP_LAMBDA = 32'h418B3333;  // 17.4
  localparam int unsigned FP_PERTURB_BITS = 20; // mantissa LSBs perturbed

  // ---------------- fixed point ----------------
  localparam int unsigned FX_W    = 64;        // map value: unsigned Q1.63
  localparam int unsigned FX_FRAC = 63;
  localparam int unsigned FX_HW   = FX_W + 2;  // Horner word: signed Q2.63
  typedef logic [FX_W-1:0]         fx_t;
  typedef logic signed [FX_HW-1:0] fxh_t;

  localparam fx_t FX_LAMBDA_16 = 64'h8B33333333333333; // 17.4/16 = 1.0875

  // (-1)^k * floor(2^63 / k!) as a signed Q2.63 word
  function automatic fxh_t fx_coef(input int unsigned k);
    logic [FX_HW-1:0] mag;
    mag = FX_HW'(1) << FX_FRAC;
    for (int unsigned j = 2; j <= k; j++) mag = mag / FX_HW'(j);
    return (k % 2 == 1) ? -fxh_t'(mag) : fxh_t'(mag);
  endfunction

  // LFSR defaults (maximal-length Fibonacci taps; bit k-1 set for tap k).
  // The perturbation LFSRs advance SAMPLE_CYCLES positions per sample, as a
  // register clocked every cycle would.
  localparam logic [19:0] LFSR20_TAPS = 20'h90000;             // x^20+x^17+1
  localparam logic [19:0] LFSR20_SEED = 20'hA5A5A;
  localparam logic [63:0] LFSR64_TAPS = 64'hD800000000000000;  // x^64+x^63+x^61+x^60+1
  localparam logic [63:0] LFSR64_SEED = 64'hA5A5A5A5A5A5A5A5;

endpackage
