// fp32_mul: combinational IEEE-754 binary32 multiplier.
//
// Multiplies the two 24-bit significands (hidden one included), normalises
// the 48-bit product by at most one place and rounds to nearest, ties to
// even, using a guard bit and a sticky bit.  Subnormal operands are read
// as zero and results below the smallest normal number are flushed to a
// signed zero; results too large become infinity; an infinity or NaN
// operand gives infinity, or a quiet NaN for NaN and for 0 * infinity.
// The source design only names this block; the rounding and the handling
// of special values are this design's choices.
//
// Interface: a, b -> y = a * b, no clock, no latency.
module fp32_mul
  import prng_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic [22:0] frac;
  logic        guard, sticky, round_up;
  logic [23:0] frac_r;      // rounded fraction with carry
  logic signed [10:0] ey;   // biased result exponent

  always_comb begin
    sa = a[31];
    sb = b[31];
    ea = a[30:23];
    eb = b[30:23];
    sy = sa ^ sb;
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    prod = ma * mb;
    ey = 11'(ea) + 11'(eb) - 11'sd127;
    if (prod[47]) begin
      frac   = prod[46:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      ey     = ey + 11'sd1;
    end else begin
      frac   = prod[45:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | frac[0]);
    frac_r   = {1'b0, frac} + 24'(round_up);
    if (frac_r[23]) ey = ey + 11'sd1;   // 1.111..1 rounded up to 10.0

    if (ea == 8'hFF || eb == 8'hFF) begin
      if ((ea == 8'hFF && a[22:0] != '0) || (eb == 8'hFF && b[22:0] != '0) ||
          ea == 8'h00 || eb == 8'h00)
        y = 32'h7FC00000;                      // NaN, or 0 * inf
      else
        y = {sy, 8'hFF, 23'h0};                // infinity
    end else if (ea == 8'h00 || eb == 8'h00 || ey <= 11'sd0) begin
      y = {sy, 31'h0};                         // zero, or flushed underflow
    end else if (ey >= 11'sd255) begin
      y = {sy, 8'hFF, 23'h0};                  // overflow
    end else begin
      y = {sy, ey[7:0], frac_r[22:0]};
    end
  end

endmodule
