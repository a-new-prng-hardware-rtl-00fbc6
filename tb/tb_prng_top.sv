// tb_prng_top: end-to-end run of both generators at full size.
//
// Starts both generators from x0 = 0.31 (lambda = 17.4) and lets each
// produce its complete run of 100000 samples, the evaluation set-up of the
// design.  Every sample is compared with the reference models.  Counted
// and required at least once: the input mux switching from x0 to the
// fed-back sample, a perturbation that changed a sample, a wrap-around of
// the fixed-point times-16 step, the stop at the sample limit (with no
// sample after it), and a restart.  Both generators must keep one sample
// per 22 cycles.  The bit streams are also scored with the frequency
// (monobit) statistic |S_n|/sqrt(n) used by randomness test suites; the
// 20 perturbed bits of the binary32 output and the 64 bits of the
// fixed-point output must stay below 2.5758 (p-value >= 0.01); the full
// 32-bit binary32 word, whose exponent bits are far from uniform, is only
// reported.  The same two streams must also have a flat histogram (64
// bins, chi-square below 103.4, the 0.1% point for 63 degrees of freedom)
// and no autocorrelation at lags 1..10 (|r| below 4/sqrt(n)).  Finally the
// Lyapunov exponent of each orbit, the mean of ln|f'(x)| with
// f'(x) = 17.4 exp(-x) (1 - x), must be positive (chaotic).
module tb_prng_top;
  import prng_pkg::*;
  import prng_ref_pkg::*;

  logic  clk = 0, rst = 1;
  logic  fp_start = 0, fx_start = 0;
  fp32_t fp_x0, fp_x_out;
  fx_t   fx_x0, fx_x_out;
  logic  fp_valid, fp_finished, fx_valid, fx_finished;
  logic [$clog2(N_SAMPLES+1)-1:0] fp_count, fx_count;
  int checks = 0, failures = 0;

  prng_top dut (
    .clk, .rst,
    .fp_start, .fp_x0, .fp_x_out, .fp_valid, .fp_finished, .fp_count,
    .fx_start, .fx_x0, .fx_x_out, .fx_valid, .fx_finished, .fx_count
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2 * 22 * N_SAMPLES + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s at %0t", msg, $time);
  endtask

  // reference state
  fp32_t fp_ref_x;  logic [19:0] fp_ref_l;
  fx_t   fx_ref_x;  logic [63:0] fx_ref_l;
  int    fp_n = 0, fx_n = 0, cyc = 0, fp_last = 0, fx_last = 0;
  int    n_mux_switch = 0, n_perturb = 0, n_wrap = 0, n_stop = 0, n_restart = 0;
  longint ones_a = 0, ones_b = 0, ones_c = 0, bits_a = 0, bits_b = 0, bits_c = 0;
  logic  scoring = 1;
  real   lyap_fp = 0.0, lyap_fx = 0.0;  // sums of ln|f'(x)| along the orbits
  real   seq_b [N_SAMPLES];               // 20 LSBs of binary32 samples, in [0, 1)
  real   seq_c [N_SAMPLES];               // fixed-point samples / 2, in [0, 1)

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always @(posedge clk) begin
    fp32_t y;
    fx_t   z;
    real   xr;
    #1;
    cyc++;
    if (fp_valid) begin
      xr = fp_to_real(fp_ref_x);
      if (scoring) lyap_fp += $ln(absr(17.4 * $exp(-xr) * (1.0 - xr)) + 1e-300);
      y = fp_map_ref(fp_ref_x, FP_LAMBDA);
      fp_ref_l = lfsr20_jump(fp_ref_l, 22);
      if (fp_n == 1) n_mux_switch++;          // second sample computed from fed-back value
      fp_ref_x = {y[31:20], y[19:0] ^ fp_ref_l};
      if (fp_ref_x != y) n_perturb++;
      checks++;
      if (fp_x_out !== fp_ref_x) fail($sformatf("fp sample %0d: %h expected %h", fp_n, fp_x_out, fp_ref_x));
      if (fp_n > 0 && cyc - fp_last != 22) fail($sformatf("fp period %0d", cyc - fp_last));
      fp_last = cyc;
      fp_n++;
      if (scoring) begin
        ones_a += $countones(fp_x_out);        bits_a += 32;
        ones_b += $countones(fp_x_out[19:0]);  bits_b += 20;
        seq_b[fp_n - 1] = real'(fp_x_out[19:0]) / (2.0 ** 20);
      end
    end
    if (fx_valid) begin
      xr = real'(fx_ref_x) / (2.0 ** 63);
      if (16.0 * xr * $exp(-xr) >= 2.0) n_wrap++;
      if (scoring) lyap_fx += $ln(absr(17.4 * $exp(-xr) * (1.0 - xr)) + 1e-300);
      z = fx_map_ref(fx_ref_x, FX_LAMBDA_16);
      fx_ref_l = lfsr64_jump(fx_ref_l, 22);
      if (fx_n == 1) n_mux_switch++;
      fx_ref_x = z ^ fx_ref_l;
      if (fx_ref_x != z) n_perturb++;
      checks++;
      if (fx_x_out !== fx_ref_x) fail($sformatf("fx sample %0d: %h expected %h", fx_n, fx_x_out, fx_ref_x));
      if (fx_n > 0 && cyc - fx_last != 22) fail($sformatf("fx period %0d", cyc - fx_last));
      fx_last = cyc;
      fx_n++;
      if (scoring) begin
        ones_c += $countones(fx_x_out);  bits_c += 64;
        seq_c[fx_n - 1] = real'(fx_x_out) / (2.0 ** 64);
      end
    end
  end

  function automatic real zscore(input longint ones, input longint bits);
    real s;
    s = real'(2 * ones - bits);
    if (s < 0) s = -s;
    return s / $sqrt(real'(bits));
  endfunction

  // chi-square of a 64-bin histogram of values in [0, 1)
  function automatic real chi_square(input real v [N_SAMPLES]);
    int  h [64];
    real e, c;
    foreach (h[i]) h[i] = 0;
    foreach (v[i]) h[int'($floor(v[i] * 64.0))]++;
    e = real'(N_SAMPLES) / 64.0;
    c = 0.0;
    foreach (h[i]) c += (real'(h[i]) - e) * (real'(h[i]) - e) / e;
    return c;
  endfunction

  // largest |autocorrelation| over lags 1..10
  function automatic real max_autocorr(input real v [N_SAMPLES]);
    real m, var_, r, worst;
    m = 0.0;
    foreach (v[i]) m += v[i];
    m /= real'(N_SAMPLES);
    var_ = 0.0;
    foreach (v[i]) var_ += (v[i] - m) * (v[i] - m);
    worst = 0.0;
    for (int k = 1; k <= 10; k++) begin
      r = 0.0;
      for (int i = 0; i + k < int'(N_SAMPLES); i++) r += (v[i] - m) * (v[i + k] - m);
      r /= var_;
      if (r < 0) r = -r;
      if (r > worst) worst = r;
    end
    return worst;
  endfunction

  task automatic restart_both(input fp32_t a, input fx_t b);
    fp_x0 = a; fx_x0 = b;
    fp_ref_x = a; fp_ref_l = LFSR20_SEED; fp_n = 0;
    fx_ref_x = b; fx_ref_l = LFSR64_SEED; fx_n = 0;
    fp_start = 1; fx_start = 1;
    @(posedge clk); #2;
    fp_start = 0; fx_start = 0;
  endtask

  initial begin
    real za, zb, zc;
    fp_x0 = '0; fx_x0 = '0;
    repeat (3) @(posedge clk);
    #2 rst = 0;
    restart_both(32'h3e9eb852, 64'h27ae147ae147ae14);   // x0 = 0.31
    wait (fp_finished && fx_finished);
    repeat (2) @(posedge clk);          // the last sample's valid follows
    #2 scoring = 0;
    checks++;
    if (fp_n != int'(N_SAMPLES) || fx_n != int'(N_SAMPLES)) fail($sformatf("sample counts %0d %0d", fp_n, fx_n));
    checks++;
    if (fp_count != N_SAMPLES || fx_count != N_SAMPLES) fail("sample counters");
    repeat (100) @(posedge clk);
    #2 checks++;
    if (fp_n == int'(N_SAMPLES) && fx_n == int'(N_SAMPLES)) n_stop++;
    else fail("samples after the limit");
    za = zscore(ones_a, bits_a);
    zb = zscore(ones_b, bits_b);
    zc = zscore(ones_c, bits_c);
    $display("monobit |S|/sqrt(n): float 32 bits %f, float 20 LSBs %f, fixed 64 bits %f", za, zb, zc);
    checks++;
    if (zb > 2.5758) fail("float 20-LSB stream fails the frequency test");
    checks++;
    if (zc > 2.5758) fail("fixed-point stream fails the frequency test");
    begin
      real cb, cc, rb, rc, lim;
      cb = chi_square(seq_b);
      cc = chi_square(seq_c);
      rb = max_autocorr(seq_b);
      rc = max_autocorr(seq_c);
      lim = 4.0 / $sqrt(real'(N_SAMPLES));
      $display("histogram chi-square (64 bins): float 20 LSBs %f, fixed %f", cb, cc);
      $display("max |autocorrelation| lags 1..10: float 20 LSBs %f, fixed %f (limit %f)", rb, rc, lim);
      checks++;
      if (cb > 103.4 || cc > 103.4) fail("histogram not flat");
      checks++;
      if (rb > lim || rc > lim) fail("autocorrelation too large");
      $display("Lyapunov exponent: float %f, fixed %f",
               lyap_fp / real'(N_SAMPLES), lyap_fx / real'(N_SAMPLES));
      checks++;
      if (lyap_fp <= 0.0 || lyap_fx <= 0.0) fail("Lyapunov exponent not positive");
    end
    // restart part-way: a second short run must again match the reference
    restart_both(32'h3fc00000, 64'hC000000000000000);
    n_restart++;
    repeat (22 * 50) @(posedge clk);
    #2 checks++;
    if (fp_n < 49 || fx_n < 49) fail("restart produced no samples");
    $display("mechanisms: mux_switch=%0d perturb=%0d wrap=%0d stop=%0d restart=%0d",
             n_mux_switch, n_perturb, n_wrap, n_stop, n_restart);
    checks++;
    if (n_mux_switch == 0 || n_perturb == 0 || n_wrap == 0 || n_stop == 0 || n_restart == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
