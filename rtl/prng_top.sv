// prng_top: the two exponential-map pseudo-random number generators.
//
// Holds the binary32 generator (exp_map_fp: exp(-x) by a 20-step Horner
// evaluation, x(n+1) = 17.4 x(n) exp(-x(n)), 20 mantissa LSBs perturbed by
// a 20-bit LFSR) and the 64-bit fixed-point generator (exp_map_fx: Q1.63,
// times 16 by a shift and times 1.0875 by a multiplier, all 64 bits
// perturbed by a 64-bit LFSR) side by side.  They share clock and reset
// and are otherwise independent, each with its own start, initial
// condition and output.
//
// Timing: each generator, once started, delivers one sample every 22
// cycles with a one-cycle valid strobe, and stops after N_SAMPLES samples.
module prng_top
  import prng_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // binary32 generator
  input  logic  fp_start,
  input  fp32_t fp_x0,
  output fp32_t fp_x_out,
  output logic  fp_valid,
  output logic  fp_finished,
  output logic [$clog2(N_SAMPLES+1)-1:0] fp_count,
  // fixed-point generator
  input  logic  fx_start,
  input  fx_t   fx_x0,
  output fx_t   fx_x_out,
  output logic  fx_valid,
  output logic  fx_finished,
  output logic [$clog2(N_SAMPLES+1)-1:0] fx_count
);

  exp_map_fp u_fp (
    .clk, .rst, .start(fp_start), .x0(fp_x0),
    .x_out(fp_x_out), .valid(fp_valid), .finished(fp_finished), .sample_count(fp_count)
  );

  exp_map_fx u_fx (
    .clk, .rst, .start(fx_start), .x0(fx_x0),
    .x_out(fx_x_out), .valid(fx_valid), .finished(fx_finished), .sample_count(fx_count)
  );

endmodule
