// tb_coeff_shift_reg: loads five known words, checks that the head shows
// them from the last to the first, that the register rotates back to the
// start after N shifts, that it holds without `shift` and that reset
// reloads it mid-sequence.
module tb_coeff_shift_reg;
  localparam int N = 5;
  localparam logic [15:0] C [N] = '{16'h1000, 16'h2001, 16'h3002, 16'h4003, 16'h5004};

  logic clk = 0, rst = 1, shift = 0;
  logic [15:0] head;
  int checks = 0, failures = 0;

  coeff_shift_reg #(.W(16), .N(N), .COEF(C)) dut (.clk, .rst, .shift, .head);

  always #5 clk = ~clk;

  task automatic expect_head(input logic [15:0] v);
    checks++;
    if (head !== v) begin
      failures++;
      $display("FAIL head=%h expected %h", head, v);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int round = 0; round < 3; round++) begin
      for (int k = N - 1; k >= 0; k--) begin
        expect_head(16'h1000 * 16'(k + 1) + 16'(k));
        shift = 1;
        @(posedge clk); #1;
      end
    end
    shift = 0;
    expect_head(16'h5004);
    repeat (3) @(posedge clk);
    #1 expect_head(16'h5004);
    shift = 1;
    repeat (2) @(posedge clk);
    #1 expect_head(16'h3002);
    shift = 0; rst = 1;
    @(posedge clk); #1 rst = 0;
    expect_head(16'h5004);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
