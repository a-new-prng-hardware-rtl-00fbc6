// tb_exp_map_fp: runs the binary32 generator from x0 = 0.31 for a short
// run and compares every sample with a reference: x * exp(-x) * 17.4 with
// exp(-x) from a reference Horner evaluation, then the 20 low bits XORed
// with a reference LFSR moved 22 positions per sample.  Also checks one sample per 22 cycles, that the
// output stays in [0, 7), the sample counter, that nothing more comes after
// the last sample, and a restart with a second initial condition.
module tb_exp_map_fp;
  import prng_pkg::*;
  import prng_ref_pkg::*;

  localparam int NS = 300;
  localparam int CW = $clog2(NS + 1);

  logic  clk = 0, rst = 1, start = 0, valid, finished;
  fp32_t x0, x_out;
  logic [CW-1:0] sample_count;
  int checks = 0, failures = 0;

  exp_map_fp #(.N_SAMPLES_P(NS)) dut (.clk, .rst, .start, .x0, .x_out, .valid, .finished, .sample_count);

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

  task automatic run(input fp32_t init, input int n);
    fp32_t x, y;
    logic [19:0] l;
    int cyc, last;
    x = init;
    l = 20'hA5A5A;
    x0 = init;
    start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 0; last = 0;
    for (int i = 0; i < n; i++) begin
      while (!valid && cyc < 100000) begin @(posedge clk); #1 cyc++; end
      y = fp_map_ref(x, FP_LAMBDA);
      l = lfsr20_jump(l, 22);
      x = {y[31:20], y[19:0] ^ l};
      checks++;
      if (x_out !== x) fail($sformatf("sample %0d: %h expected %h", i, x_out, x));
      checks++;
      if (x_out[31] || fp_to_real(x_out) >= 7.0) fail($sformatf("sample %0d out of range", i));
      checks++;
      if (i > 0 && cyc - last != 22) fail($sformatf("period %0d", cyc - last));
      checks++;
      if (sample_count != CW'(i + 1)) fail("sample_count");
      last = cyc;
      @(posedge clk); #1 cyc++;
    end
  endtask

  initial begin
    x0 = 32'h3e9eb852;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(32'h3e9eb852, NS);               // 0.31
    repeat (3) @(posedge clk);
    #1 checks++;
    if (!finished) fail("not finished");
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      if (valid) fail("sample after finish");
    end
    run(32'h3fc00000, 40);               // restart from 1.5
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
