// tb_fp32_mul: checks the binary32 multiplier against a double-precision
// reference on directed cases and random operands whose products stay in
// the normal range, plus zero, infinity, NaN, overflow and underflow.
module tb_fp32_mul;
  import prng_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3f800000, 32'h40000000, 32'h40000000);     // 1 * 2
    check(32'h3fc00000, 32'h3fc00000, 32'h40100000);     // 1.5 * 1.5
    check(32'h3e9eb852, 32'h418b3333, fp_mul_ref(32'h3e9eb852, 32'h418b3333));
    check(32'h00000000, 32'h418b3333, 32'h00000000);     // zero
    check(32'h80000000, 32'h418b3333, 32'h80000000);     // -0
    check(32'h7f800000, 32'h40000000, 32'h7f800000);     // inf
    check(32'h7f800000, 32'h00000000, 32'h7fc00000);     // inf * 0
    check(32'h7f000000, 32'h7f000000, 32'h7f800000);     // overflow
    check(32'h00800000, 32'h3f000000, 32'h00000000);     // underflow -> 0
    check(32'h3f800001, 32'h3f7fffff, fp_mul_ref(32'h3f800001, 32'h3f7fffff));
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] ra, rb;
      ra = rand_fp(64, 190);
      rb = rand_fp(64, 190);
      check(ra, rb, fp_mul_ref(ra, rb));
    end
    // mantissas that round up to the next binade
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] ra, rb;
      ra = {1'b0, 8'd127, 23'h7FFF00 | 23'($urandom_range(255))};
      rb = {1'b0, 8'd127, 23'h7FFF00 | 23'($urandom_range(255))};
      check(ra, rb, fp_mul_ref(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
