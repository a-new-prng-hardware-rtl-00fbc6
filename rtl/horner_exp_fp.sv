// horner_exp_fp: exp(-x0) in binary32 by Horner's rule, one step per clock.
//
// exp(-x) is replaced by its Maclaurin polynomial of degree N = 20 and
// evaluated with the recurrence
//     b_1 = a_20 x0 + a_19,   b_i = b_(i-1) x0 + a_(20-i),   i = 2..20,
// where a_k = (-1)^k / k!.  The datapath follows the source design: a
// 2-to-1 mux chooses a_20 (select 0, first step only) or the register
// output b (select 1), a multiplier forms the product with x0, an adder
// adds the coefficient presented by a rotating shift register (a19 first,
// a0 last), and the register stores the sum.  A counter 0..19 tracks the
// steps and raises `done` ("Enable Map") after the last one.
// The source design times multiplier and adder by delaying the clock; here
// one clock is used and multiply-add is combinational in a single cycle,
// which keeps its figure of 20 clock cycles per evaluation.
//
// Timing: `start` is taken when the unit is idle; the first step is done on
// that clock edge and the 20th on the 19th edge after it, where `b` holds
// b_20 and `done` is high for one cycle.  x0 must stay stable while `busy`.
module horner_exp_fp
  import prng_pkg::*;
#(
  parameter int unsigned N = N_TERMS
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  fp32_t x0,
  output logic  busy,
  output logic  done,
  output fp32_t b
);

  localparam logic [31:0] COEF [N] = FP_COEF[0:N-1];

  logic                 sel;          // mux select S: 0 -> a_N, 1 -> b
  logic                 step;         // a Horner step happens this cycle
  logic [$clog2(N)-1:0] count;        // counter 0 .. N-1
  fp32_t                mux_out, prod, sum, coef;

  assign sel  = busy;
  assign step = busy | start;

  coeff_shift_reg #(.W(32), .N(N), .COEF(COEF)) u_coef (
    .clk(clk), .rst(rst), .shift(step), .head(coef)
  );

  assign mux_out = sel ? b : FP_COEF[N];

  fp32_mul u_mul (.a(mux_out), .b(x0),   .y(prod));
  fp32_add u_add (.a(prod),    .b(coef), .y(sum));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      count <= '0;
      b     <= '0;
    end else begin
      done <= 1'b0;
      if (step) begin
        b <= sum;
        if (count == ($clog2(N))'(N-1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          count <= '0;
        end else begin
          busy  <= 1'b1;
          count <= count + 1'b1;
        end
      end
    end
  end

endmodule
