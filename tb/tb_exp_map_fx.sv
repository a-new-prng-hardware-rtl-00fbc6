// tb_exp_map_fx: runs the fixed-point generator from x0 = 0.31 for a short
// run and compares every sample with a reference: x * exp(-x) in Q1.63,
// shifted left 4 places, times 1.0875, all 64 bits XORed with a reference
// LFSR moved 22 positions per sample.  Checks one sample per 22 cycles, the sample counter, the stop
// after the last sample, a restart, and that the wrap-around of the
// times-16 step happened in the run.
module tb_exp_map_fx;
  import prng_pkg::*;
  import prng_ref_pkg::*;

  localparam int NS = 300;
  localparam int CW = $clog2(NS + 1);

  logic clk = 0, rst = 1, start = 0, valid, finished;
  fx_t  x0, x_out;
  logic [CW-1:0] sample_count;
  int checks = 0, failures = 0, wraps = 0;

  exp_map_fx #(.N_SAMPLES_P(NS)) dut (.clk, .rst, .start, .x0, .x_out, .valid, .finished, .sample_count);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  task automatic run(input fx_t init, input int n);
    fx_t x, y;
    logic [63:0] l;
    int cyc, last;
    real xr;
    x = init;
    l = 64'hA5A5A5A5A5A5A5A5;
    x0 = init;
    start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 0; last = 0;
    for (int i = 0; i < n; i++) begin
      while (!valid && cyc < 100000) begin @(posedge clk); #1 cyc++; end
      xr = real'(x) / (2.0 ** 63);
      if (16.0 * xr * $exp(-xr) >= 2.0) wraps++;
      y = fx_map_ref(x, FX_LAMBDA_16);
      l = lfsr64_jump(l, 22);
      x = y ^ l;
      checks++;
      if (x_out !== x) fail($sformatf("sample %0d: %h expected %h", i, x_out, x));
      checks++;
      if (i > 0 && cyc - last != 22) fail($sformatf("period %0d", cyc - last));
      checks++;
      if (sample_count != CW'(i + 1)) fail("sample_count");
      last = cyc;
      @(posedge clk); #1 cyc++;
    end
  endtask

  initial begin
    x0 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(64'h27ae147ae147ae14, NS);       // 0.31
    repeat (3) @(posedge clk);
    #1 checks++;
    if (!finished) fail("not finished");
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      if (valid) fail("sample after finish");
    end
    run(64'hC000000000000000, 40);       // restart from 1.5
    checks++;
    if (wraps == 0) fail("no wrap-around seen");
    $display("wrap-arounds: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
