// tb_horner_exp_fp: evaluates exp(-x) for x0 = 0.31, 0, and random x in
// [0, 7) (the range of the binary32 map).  Each result must equal, bit for
// bit, a reference Horner evaluation with separately rounded products and
// sums; for x < 2 it must also lie within 1e-5 relative of exp(-x).  The
// time from start to done must be 20 clock cycles, and `start` while busy
// must not disturb the evaluation.
module tb_horner_exp_fp;
  import prng_pkg::*;
  import prng_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, busy, done;
  fp32_t x0, b;
  int checks = 0, failures = 0;

  horner_exp_fp dut (.clk, .rst, .start, .x0, .busy, .done, .b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fp32_t x);
    int cycles;
    fp32_t expv;
    real xr, er;
    x0 = x;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 1;
    while (!done && cycles < 100) begin
      if (cycles == 5) start = 1;        // ignored while busy
      @(posedge clk); #1;
      start = 0;
      cycles++;
    end
    // done rises after the 20th edge counted from the start edge
    checks++;
    if (cycles != 20) begin failures++; $display("FAIL latency %0d", cycles); end
    expv = fp_horner_ref(x, 20);
    checks++;
    if (b !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h b=%h expected %h", x, b, expv);
    end
    xr = fp_to_real(x);
    if (xr < 2.0) begin
      er = $exp(-xr);
      checks++;
      if ((fp_to_real(b) - er) > 1e-5 * er || (er - fp_to_real(b)) > 1e-5 * er) begin
        failures++;
        $display("FAIL exp(-%f) = %e, got %e", xr, er, fp_to_real(b));
      end
    end
    @(posedge clk); #1;
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle"); end
  endtask

  initial begin
    x0 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // first step must use the coefficient table built from (-1)^k/k!
    for (int k = 0; k <= 20; k++) begin
      checks++;
      if (FP_COEF[k] !== fp_coef_ref(k)) begin failures++; $display("FAIL coef %0d", k); end
    end
    run(32'h3e9eb852);                   // 0.31
    run(32'h00000000);                   // 0 -> exactly 1
    checks++;
    if (b !== 32'h3f800000) begin failures++; $display("FAIL exp(0) = %h", b); end
    for (int i = 0; i < 300; i++) run(real_to_fp(7.0 * real'($urandom_range(1_000_000)) / 1.0e6));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
