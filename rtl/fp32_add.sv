// fp32_add: combinational IEEE-754 binary32 adder.
//
// The operand of larger magnitude is kept, the other one's significand is
// shifted right by the exponent difference into three extra bits (guard,
// round, sticky), the two are added or subtracted according to the signs,
// the sum is normalised (one place right after a carry, left by the count
// of leading zeros after a cancellation) and rounded to nearest, ties to
// even.  Subnormal operands are read as zero, results below the smallest
// normal number are flushed to zero, an exact zero result is +0 (or -0
// when both operands are -0), overflow gives infinity.  Infinity and NaN
// operands give infinity or a quiet NaN.  The source design only draws an
// adder; these arithmetic details are this design's choices.
//
// Interface: a, b -> y = a + b, no clock, no latency.
module fp32_add
  import prng_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        a_zero, b_zero, a_big;
  fp32_t       greater, lesser;
  logic [7:0]  e1, e2, d;
  logic        s1, s2;
  logic [27:0] m1, m2;          // carry, hidden one, 23 fraction, G, R, S
  logic [54:0] m2_wide;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic signed [9:0] ey;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;          // rounded 24-bit significand with carry

  always_comb begin
    a_zero = (a[30:23] == 8'h00);
    b_zero = (b[30:23] == 8'h00);
    a_big  = (a[30:0] >= b[30:0]);
    greater = a_big ? a : b;
    lesser  = a_big ? b : a;
    s1 = greater[31];
    s2 = lesser[31];
    e1 = greater[30:23];
    e2 = lesser[30:23];
    d  = e1 - e2;
    m1 = {2'b01, greater[22:0], 3'b000};
    // align the smaller significand, collecting the bits shifted out
    m2_wide = {2'b01, lesser[22:0], 3'b000, 27'h0} >> d;
    if (d >= 8'd28)
      m2 = 28'd1;                                   // only sticky remains
    else
      m2 = {m2_wide[54:28], m2_wide[27] | (|m2_wide[26:0])};

    if (s1 == s2) sum = m1 + m2;
    else          sum = m1 - m2;

    ey = 10'(e1);
    lz = '0;
    if (sum[27]) begin
      sum = {1'b0, sum[27:2], sum[1] | sum[0]};     // shift right, keep sticky
      ey  = ey + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) begin
          lz = 5'(26 - i);
          break;
        end
      end
      sum = sum << lz;
      ey  = ey - 10'(lz);
    end
    guard    = sum[2];
    sticky   = sum[1] | sum[0];
    round_up = guard & (sticky | sum[3]);
    mant_r   = {1'b0, sum[26:3]} + 25'(round_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      ey     = ey + 10'sd1;
    end

    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) begin
      if ((a[30:23] == 8'hFF && a[22:0] != '0) || (b[30:23] == 8'hFF && b[22:0] != '0) ||
          (a[30:23] == 8'hFF && b[30:23] == 8'hFF && a[31] != b[31]))
        y = 32'h7FC00000;
      else
        y = greater;                                    // infinity
    end else if (a_zero && b_zero) begin
      y = {a[31] & b[31], 31'h0};
    end else if (b_zero) begin
      y = a;
    end else if (a_zero) begin
      y = b;
    end else if (sum == '0 || ey <= 10'sd0) begin
      y = 32'h0;                                    // exact zero or underflow
    end else if (ey >= 10'sd255) begin
      y = {s1, 8'hFF, 23'h0};
    end else begin
      y = {s1, ey[7:0], mant_r[22:0]};
    end
  end

endmodule
