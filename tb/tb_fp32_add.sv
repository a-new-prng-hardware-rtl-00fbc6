// tb_fp32_add: checks the binary32 adder against a double-precision
// reference: random operands over all exponent differences and signs,
// near-cancellation, exact cancellation, zeros and infinities.
module tb_fp32_add;
  import prng_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3f800000, 32'h3f800000, 32'h40000000);     // 1 + 1
    check(32'h3f800000, 32'hbf800000, 32'h00000000);     // 1 - 1
    check(32'h40400000, 32'hbf800000, 32'h40000000);     // 3 - 1
    check(32'h00000000, 32'hbe2aaaab, 32'hbe2aaaab);     // 0 + a
    check(32'h3d2aaaab, 32'h00000000, 32'h3d2aaaab);
    check(32'h80000000, 32'h80000000, 32'h80000000);     // -0 + -0
    check(32'h7f800000, 32'h3f800000, 32'h7f800000);     // inf
    check(32'h7f7fffff, 32'h7f7fffff, 32'h7f800000);     // overflow
    check(32'h3f800000, 32'h33800000, 32'h3f800000);     // tie to even (down)
    check(32'h3f800001, 32'h33800000, 32'h3f800002);     // tie to even (up)
    for (int i = 0; i < 30000; i++) begin
      logic [31:0] ra, rb;
      int ea, d;
      ea = 60 + int'($urandom_range(130));
      d  = int'($urandom_range(40));
      ra = {1'($urandom), 8'(ea), 23'($urandom)};
      rb = {1'($urandom), 8'(ea - d), 23'($urandom)};
      if ($urandom_range(1)) check(ra, rb, fp_add_ref(ra, rb));
      else                   check(rb, ra, fp_add_ref(rb, ra));
    end
    // near cancellation: same exponent or one apart, opposite signs
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] ra, rb;
      ra = {1'b0, 8'd127, 23'($urandom)};
      rb = {1'b1, 8'(127 - $urandom_range(1)), ra[22:0] ^ 23'($urandom_range(255))};
      check(ra, rb, fp_add_ref(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
