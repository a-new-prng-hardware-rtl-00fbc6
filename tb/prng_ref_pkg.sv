// prng_ref_pkg: reference models for the testbenches of the PRNG.
//
// binary32 arithmetic is modelled with the simulator's double-precision
// `real`: operands are converted exactly to double, the operation is done
// in double and the result is rounded once to binary32 (nearest, ties to
// even, underflow flushed to zero).  For products of two binary32 values
// the double result is exact; for sums the double has more than 2*24+2
// bits, so rounding twice gives the correctly rounded binary32 sum.
// Fixed-point references use wide integer arithmetic, with the Maclaurin
// coefficients computed from k! directly.  The LFSR references spell out
// the feedback taps bit by bit.
package prng_ref_pkg;

  function automatic real fp_to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'h0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_fp(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, s;
    d = $realtobits(r);
    if (d[62:0] == '0) return 32'h0;
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) begin
      if (m == 24'hFFFFFF) begin
        m = 24'h800000;
        e = e + 1;
      end else m = m + 1;
    end
    if (e <= 0) return {d[63], 31'h0};
    if (e >= 255) return {d[63], 8'hFF, 23'h0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] fp_mul_ref(input logic [31:0] a, input logic [31:0] b);
    return real_to_fp(fp_to_real(a) * fp_to_real(b));
  endfunction

  function automatic logic [31:0] fp_add_ref(input logic [31:0] a, input logic [31:0] b);
    return real_to_fp(fp_to_real(a) + fp_to_real(b));
  endfunction

  // a_k = (-1)^k / k! rounded to binary32
  function automatic logic [31:0] fp_coef_ref(input int k);
    real f;
    f = 1.0;
    for (int j = 2; j <= k; j++) f = f * real'(j);
    return real_to_fp(((k % 2) ? -1.0 : 1.0) / f);
  endfunction

  // Horner evaluation of the degree-n Maclaurin polynomial of exp(-x)
  function automatic logic [31:0] fp_horner_ref(input logic [31:0] x, input int n);
    logic [31:0] b;
    b = fp_coef_ref(n);
    for (int k = n - 1; k >= 0; k--) b = fp_add_ref(fp_mul_ref(b, x), fp_coef_ref(k));
    return b;
  endfunction

  // one map step before perturbation: x * exp(-x) * lambda
  function automatic logic [31:0] fp_map_ref(input logic [31:0] x, input logic [31:0] lambda);
    return fp_mul_ref(fp_mul_ref(x, fp_horner_ref(x, 20)), lambda);
  endfunction

  // ---------------- fixed point, 63 fraction bits ----------------
  function automatic logic signed [65:0] fx_coef_ref(input int k);
    longint unsigned fact;
    logic [65:0] mag;
    fact = 1;
    for (int j = 2; j <= k; j++) fact = fact * longint'(j);
    mag = (66'd1 << 63) / 66'(fact);
    return (k % 2) ? -$signed(mag) : $signed(mag);
  endfunction

  function automatic logic signed [65:0] fx_horner_ref(input logic [63:0] x, input int n);
    logic signed [65:0]  b;
    logic signed [131:0] p;
    b = fx_coef_ref(n);
    for (int k = n - 1; k >= 0; k--) begin
      p = 132'(b) * $signed({68'd0, x});
      b = p[128:63] + fx_coef_ref(k);
    end
    return b;
  endfunction

  // x * exp(-x), times 16 (dropping bits above the integer bit), times 1.0875
  function automatic logic [63:0] fx_map_ref(input logic [63:0] x, input logic [63:0] lam16);
    logic signed [65:0]  e;
    logic signed [131:0] p1;
    logic [127:0]        p2;
    logic [63:0]         q;
    e  = fx_horner_ref(x, 20);
    p1 = $signed({68'd0, x}) * 132'(e);
    q  = p1[126:63];
    q  = {q[59:0], 4'b0000};
    p2 = 128'(q) * 128'(lam16);
    return p2[126:63];
  endfunction

  function automatic logic [19:0] lfsr20_next(input logic [19:0] s);
    return {s[18:0], s[19] ^ s[16]};
  endfunction

  function automatic logic [63:0] lfsr64_next(input logic [63:0] s);
    return {s[62:0], s[63] ^ s[62] ^ s[60] ^ s[59]};
  endfunction

  function automatic logic [19:0] lfsr20_jump(input logic [19:0] s, input int n);
    for (int i = 0; i < n; i++) s = lfsr20_next(s);
    return s;
  endfunction

  function automatic logic [63:0] lfsr64_jump(input logic [63:0] s, input int n);
    for (int i = 0; i < n; i++) s = lfsr64_next(s);
    return s;
  endfunction

  // value of a Q1.63 number as a real
  function automatic real fx_to_real(input logic signed [65:0] v);
    return real'(v) / (2.0 ** 63);
  endfunction

endpackage
