// tb_lfsr: checks the 20-stage LFSR step by step against its feedback
// equation, that it holds when not stepped, that its period is exactly
// 2^20 - 1 (maximal length), and the 64-stage configuration used by the
// fixed-point generator against its own feedback equation, and 22-step
// versions of both (22 shifts per `step`) against 22 single steps.
module tb_lfsr;
  import prng_pkg::*;
  import prng_ref_pkg::*;

  logic clk = 0, rst = 1, step = 0;
  logic [19:0] s20, m20;
  logic [63:0] s64, m64;
  logic [19:0] j20, n20;
  logic [63:0] j64, n64;
  int checks = 0, failures = 0;
  int period;

  lfsr #(.W(20), .TAPS(LFSR20_TAPS), .SEED(LFSR20_SEED)) dut20 (.clk, .rst, .step, .state(s20));
  lfsr #(.W(64), .TAPS(LFSR64_TAPS), .SEED(LFSR64_SEED)) dut64 (.clk, .rst, .step, .state(s64));

  lfsr #(.W(20), .TAPS(LFSR20_TAPS), .SEED(LFSR20_SEED), .STEPS(22)) dut20j (.clk, .rst, .step, .state(j20));
  lfsr #(.W(64), .TAPS(LFSR64_TAPS), .SEED(LFSR64_SEED), .STEPS(22)) dut64j (.clk, .rst, .step, .state(j64));

  always #5 clk = ~clk;

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    m20 = 20'hA5A5A;
    m64 = 64'hA5A5A5A5A5A5A5A5;
    n20 = m20;
    n64 = m64;
    checks++;
    if (s20 !== m20 || s64 !== m64) begin failures++; $display("FAIL seed"); end
    step = 1;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #1;
      m20 = lfsr20_next(m20);
      m64 = lfsr64_next(m64);
      for (int j = 0; j < 22; j++) begin
        n20 = lfsr20_next(n20);
        n64 = lfsr64_next(n64);
      end
      checks++;
      if (j20 !== n20 || j64 !== n64) begin
        failures++;
        if (failures < 5) $display("FAIL 22-step %0d: %h/%h expected %h/%h", i, j20, j64, n20, n64);
      end
      checks++;
      if (s20 !== m20 || s64 !== m64) begin
        failures++;
        if (failures < 5) $display("FAIL step %0d: %h/%h expected %h/%h", i, s20, s64, m20, m64);
      end
    end
    step = 0;
    repeat (4) @(posedge clk);
    #1 checks++;
    if (s20 !== m20) begin failures++; $display("FAIL held"); end
    // period of the 20-bit register
    step = 1;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (s20 !== m20 && period < (1 << 21));
    checks++;
    if (period != (1 << 20) - 1) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
