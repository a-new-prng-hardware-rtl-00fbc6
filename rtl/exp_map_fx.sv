// exp_map_fx: 64-bit fixed-point exponential chaotic map with LFSR perturbation.
//
// Same organisation as exp_map_fp, on unsigned Q1.63 values (one integer
// bit, 63 fraction bits, range [0, 2)):
//   * mux x0 / fed-back sample, FF D select (map_sequencer);
//   * horner_exp_fx evaluates exp(-x) with 20 Horner steps;
//   * Register 1 holds x (rA) and exp(-x) (rB);
//   * rA * rB is shifted left by 4 places (times 16) and multiplied by
//     lambda/16 = 1.0875, which together give lambda = 17.4;
//   * Register 2 holds the result; all 64 bits are XORed with a 64-stage
//     LFSR to give x_out = x(n+1), which is also fed back.
// Every product is truncated to Q1.63 and everything above the one integer
// bit is dropped, so the value wraps modulo 2 (the source design states the
// fixed-point output lies in [0, 2)).  The shift, the lambda/16 constant and
// the 64 perturbed bits follow the source design; truncation, the LFSR taps
// and seed and the single-clock sequencing are this design's choices.  As
// in exp_map_fp the LFSR moves 22 positions per sample, the number of clock
// cycles in one iteration.
//
// Timing: identical to exp_map_fp, one sample every 22 cycles.
module exp_map_fx
  import prng_pkg::*;
#(
  parameter fx_t          LAMBDA_16   = FX_LAMBDA_16,
  parameter int unsigned  N_SAMPLES_P = N_SAMPLES,
  parameter fx_t          LFSR_TAPS   = LFSR64_TAPS,
  parameter fx_t          LFSR_SEED   = LFSR64_SEED,
  parameter int unsigned  LFSR_STEPS  = SAMPLE_CYCLES
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fx_t  x0,
  output fx_t  x_out,
  output logic valid,
  output logic finished,
  output logic [$clog2(N_SAMPLES_P+1)-1:0] sample_count
);

  localparam int unsigned CW = $clog2(N_SAMPLES_P + 1);

  logic          exp_start, exp_done, exp_busy;
  logic          reg1_load, reg2_load, sel_feedback;
  fx_t           x_sel, r_a, prod1, prod1_sh, prod2, reg2, lfsr_state;
  fxh_t          exp_b, r_b;
  logic signed [2*FX_HW-1:0] prod1_full;
  logic [2*FX_W-1:0]         prod2_full;

  map_sequencer #(.N_SAMPLES_P(N_SAMPLES_P)) u_seq (
    .clk, .rst, .start, .exp_done, .exp_start, .reg1_load, .reg2_load,
    .sel_feedback, .sample_count, .finished
  );

  assign x_sel = sel_feedback ? x_out : x0;

  horner_exp_fx u_exp (
    .clk, .rst, .start(exp_start), .x0(x_sel), .busy(exp_busy), .done(exp_done), .b(exp_b)
  );

  // rA * rB, kept modulo 2 in Q1.63
  assign prod1_full = (2*FX_HW)'(signed'({2'b00, r_a})) * (2*FX_HW)'(r_b);
  assign prod1      = prod1_full[FX_FRAC +: FX_W];
  // shift left logical by 4 (times 16), then times lambda/16
  assign prod1_sh   = prod1 << 4;
  assign prod2_full = prod1_sh * LAMBDA_16;
  assign prod2      = prod2_full[FX_FRAC +: FX_W];

  lfsr #(.W(FX_W), .TAPS(LFSR_TAPS), .SEED(LFSR_SEED), .STEPS(LFSR_STEPS)) u_lfsr (
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

  assign x_out = reg2 ^ lfsr_state;

  assert property (@(posedge clk) disable iff (rst) exp_start |-> !exp_busy);

endmodule
