// exp_map_fp: binary32 exponential chaotic map with LFSR perturbation.
//
// Produces the sequence x(n+1) = lambda * x(n) * exp(-x(n)), lambda = 17.4,
// starting from the input x0, in IEEE-754 single precision:
//   * a 2-to-1 mux feeds the map with x0 until the first exponential is
//     done and with the fed-back output afterwards (select held in FF D,
//     inside map_sequencer);
//   * horner_exp_fp evaluates exp(-x) with 20 Horner steps;
//   * Register 1 holds x (rA) and exp(-x) (rB);
//   * two multipliers form rA * rB * lambda into Register 2;
//   * the 20 least significant mantissa bits of Register 2 are XORed with
//     the 20 flip-flops of an LFSR and concatenated with the upper 12 bits
//     (sign, exponent, 3 mantissa bits) to give x_out = x(n+1), which is
//     also the value fed back.
// The structure, lambda, the 20 perturbed bits and the 100000-sample run
// follow the source design; the LFSR taps and seed, and the single-clock
// sequencing are this design's choices.  The LFSR moves LFSR_STEPS = 22
// positions each time Register 2 is written, so it follows the sequence of
// a register clocked every cycle while the fed-back value stays stable for
// a whole iteration (with one position per sample, consecutive perturbation
// words are one-bit shifts of each other and the output histogram is
// visibly uneven).
//
// Timing: after `start`, a new x_out every 22 cycles, marked by a one-cycle
// `valid`; `sample_count` counts the samples delivered and `finished`
// rises after N_SAMPLES_P samples.  x0 must be stable
// from `start` until the first `valid`.
module exp_map_fp
  import prng_pkg::*;
#(
  parameter fp32_t        LAMBDA       = FP_LAMBDA,
  parameter int unsigned  N_SAMPLES_P  = N_SAMPLES,
  parameter int unsigned  PERTURB_BITS = FP_PERTURB_BITS,
  parameter logic [PERTURB_BITS-1:0] LFSR_TAPS = PERTURB_BITS'(LFSR20_TAPS),
  parameter logic [PERTURB_BITS-1:0] LFSR_SEED = PERTURB_BITS'(LFSR20_SEED),
  parameter int unsigned  LFSR_STEPS   = SAMPLE_CYCLES
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  fp32_t x0,
  output fp32_t x_out,
  output logic  valid,
  output logic  finished,
  output logic [$clog2(N_SAMPLES_P+1)-1:0] sample_count
);

  localparam int unsigned CW = $clog2(N_SAMPLES_P + 1);

  logic          exp_start, exp_done, exp_busy;
  logic          reg1_load, reg2_load, sel_feedback;
  fp32_t         x_sel, exp_b, r_a, r_b, prod1, prod2, reg2;
  logic [PERTURB_BITS-1:0] lfsr_state;

  map_sequencer #(.N_SAMPLES_P(N_SAMPLES_P)) u_seq (
    .clk, .rst, .start, .exp_done, .exp_start, .reg1_load, .reg2_load,
    .sel_feedback, .sample_count, .finished
  );

  // input mux: 0 -> x0, 1 -> previous sample
  assign x_sel = sel_feedback ? x_out : x0;

  horner_exp_fp u_exp (
    .clk, .rst, .start(exp_start), .x0(x_sel), .busy(exp_busy), .done(exp_done), .b(exp_b)
  );

  fp32_mul u_mul1 (.a(r_a),   .b(r_b),    .y(prod1));
  fp32_mul u_mul2 (.a(prod1), .b(LAMBDA), .y(prod2));

  lfsr #(.W(PERTURB_BITS), .TAPS(LFSR_TAPS), .SEED(LFSR_SEED), .STEPS(LFSR_STEPS)) u_lfsr (
    .clk, .rst(rst | start), .step(reg2_load), .state(lfsr_state)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      r_a   <= '0;
      r_b   <= '0;
      reg2  <= '0;
      valid <= 1'b0;
    end else begin
      if (reg1_load) begin
        r_a <= x_sel;
        r_b <= exp_b;
      end
      if (reg2_load) reg2 <= prod2;
      valid <= reg2_load;
    end
  end

  assign x_out = {reg2[31:PERTURB_BITS], reg2[PERTURB_BITS-1:0] ^ lfsr_state};

  // the exponential is only started when the Horner unit is idle
  assert property (@(posedge clk) disable iff (rst) exp_start |-> !exp_busy);

endmodule
