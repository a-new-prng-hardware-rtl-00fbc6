// tb_horner_exp_fx: evaluates exp(-x) in fixed point for x0 = 0.31, 0, values
// near 2 and random x in [0, 2).  Each result must equal a reference Horner
// evaluation with coefficients built from k! and truncated products, and
// must lie within 1e-12 of exp(-x).  Latency from start to done: 20 cycles.
module tb_horner_exp_fx;
  import prng_pkg::*;
  import prng_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, busy, done;
  fx_t  x0;
  fxh_t b;
  int checks = 0, failures = 0;

  horner_exp_fx dut (.clk, .rst, .start, .x0, .busy, .done, .b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fx_t x);
    int cycles;
    fxh_t expv;
    real xr, er, d;
    x0 = x;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 1;
    while (!done && cycles < 100) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (cycles != 20) begin failures++; $display("FAIL latency %0d", cycles); end
    expv = fx_horner_ref(x, 20);
    checks++;
    if (b !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h b=%h expected %h", x, b, expv);
    end
    xr = real'(x) / (2.0 ** 63);
    er = $exp(-xr);
    d  = fx_to_real(b) - er;
    checks++;
    if (d > 1e-12 || d < -1e-12) begin
      failures++;
      $display("FAIL exp(-%f) = %.15f, got %.15f", xr, er, fx_to_real(b));
    end
    @(posedge clk); #1;
  endtask

  initial begin
    x0 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(64'h27ae147ae147ae14);           // 0.31
    run(64'h0);                          // exp(0) = 1
    checks++;
    if (b !== fxh_t'(66'h1) <<< 63) begin failures++; $display("FAIL exp(0)"); end
    run(64'hFFFFFFFFFFFFFFFF);           // just below 2
    for (int i = 0; i < 300; i++) run({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
