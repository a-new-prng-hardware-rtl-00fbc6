// horner_exp_fx: exp(-x0) in fixed point by Horner's rule, one step per clock.
//
// Same recurrence and datapath as horner_exp_fp (mux a_20 / b, multiplier
// with x0, adder with the coefficient from a rotating shift register,
// register b, counter 0..19), in two's-complement fixed point.  The
// argument x0 is unsigned Q1.63, the map value format of the source design
// (one integer bit, 63 fraction bits).  The Horner word is signed with two
// integer bits and 63 fraction bits (66 bits), since the partial sums are
// signed and exp(-0) = 1; this width is this design's choice.  Products are
// truncated (arithmetic shift right by 63) and the coefficients are
// (-1)^k floor(2^63/k!).
//
// Timing: as horner_exp_fp: the first step on the edge that takes `start`,
// b_20 in `b` with `done` high after the 20th edge.  x0 must stay stable
// while `busy`.
module horner_exp_fx
  import prng_pkg::*;
#(
  parameter int unsigned N = N_TERMS
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fx_t  x0,
  output logic busy,
  output logic done,
  output fxh_t b
);

  typedef logic [FX_HW-1:0] coef_arr_t [N];

  // coefficient store contents: COEF[k] = a_k, k = 0 .. N-1
  function automatic coef_arr_t make_table();
    coef_arr_t t;
    for (int unsigned k = 0; k < N; k++) t[k] = fx_coef(k);
    return t;
  endfunction

  localparam coef_arr_t COEF = make_table();
  localparam fxh_t      A_N  = fx_coef(N);

  logic                            sel, step;
  logic [$clog2(N)-1:0]            count;
  fxh_t                            mux_out, coef, sum;
  fxh_t                            x_ext;
  logic signed [2*FX_HW-1:0]       prod_full;
  fxh_t                            prod;

  assign sel  = busy;
  assign step = busy | start;

  coeff_shift_reg #(.W(FX_HW), .N(N), .COEF(COEF)) u_coef (
    .clk(clk), .rst(rst), .shift(step), .head(coef)
  );

  assign mux_out   = sel ? b : A_N;
  assign x_ext     = signed'({2'b00, x0});
  assign prod_full = (2*FX_HW)'(mux_out) * (2*FX_HW)'(x_ext);
  assign prod      = fxh_t'(prod_full >>> FX_FRAC);
  assign sum       = prod + coef;

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
