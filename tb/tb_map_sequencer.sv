// tb_map_sequencer: drives the sequencer with a stand-in exponential unit
// that answers 20 cycles after each start.  Checks: nothing happens before
// start; the input select (FF D) is 0 until the first Register 1 load and
// 1 afterwards; Register 1 loads exactly when exp_done is high; Register 2
// loads one cycle later; samples come every 22 cycles; the run stops after
// N_SAMPLES_P samples with no further Register 2 load; start restarts it.
module tb_map_sequencer;
  localparam int NS = 5;
  localparam int CW = $clog2(NS + 1);

  logic clk = 0, rst = 1, start = 0;
  logic exp_done, exp_start, reg1_load, reg2_load, sel_feedback, finished;
  logic [CW-1:0] sample_count;
  int checks = 0, failures = 0;

  map_sequencer #(.N_SAMPLES_P(NS)) dut (
    .clk, .rst, .start, .exp_done, .exp_start, .reg1_load, .reg2_load,
    .sel_feedback, .sample_count, .finished
  );

  // stand-in Horner unit: done high after the 20th edge counted from start
  int exp_cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      exp_cnt  <= 0;
      exp_done <= 1'b0;
    end else begin
      exp_done <= 1'b0;
      if (exp_start) exp_cnt <= 1;
      else if (exp_cnt != 0) begin
        if (exp_cnt == 19) begin
          exp_cnt  <= 0;
          exp_done <= 1'b1;
        end else exp_cnt <= exp_cnt + 1;
      end
    end
  end

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s at %0t", msg, $time);
  endtask

  // per-cycle rule checks
  int cyc = 0, last_reg2 = -1, n_reg2 = 0, n_reg1 = 0;
  logic seen_reg1 = 0;
  logic prev_reg1 = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    checks++;
    if (reg1_load !== exp_done) fail("reg1_load not with exp_done");
    if (reg2_load !== prev_reg1) fail("reg2_load not one cycle after reg1_load");
    if (sel_feedback !== seen_reg1) fail("FF D select");
    if (reg1_load) begin n_reg1++; seen_reg1 = 1; end
    if (reg2_load) begin
      if (last_reg2 >= 0 && cyc - last_reg2 != 22) fail($sformatf("period %0d", cyc - last_reg2));
      last_reg2 = cyc;
      n_reg2++;
    end
    prev_reg1 = reg1_load;
    if (start) begin seen_reg1 = 0; last_reg2 = -1; end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (30) @(posedge clk);
    #1 checks++;
    if (n_reg1 != 0 || n_reg2 != 0 || exp_start) fail("activity before start");
    start = 1;
    @(posedge clk); #1 start = 0;
    wait (finished);
    @(posedge clk); #1;
    checks++;
    if (n_reg2 != NS || sample_count != CW'(NS)) fail($sformatf("samples %0d count %0d", n_reg2, sample_count));
    repeat (60) @(posedge clk);
    #1 checks++;
    if (n_reg2 != NS || exp_start) fail("activity after finish");
    // restart part-way through a second run
    start = 1;
    @(posedge clk); #1 start = 0;
    checks++;
    if (sample_count != 0 || sel_feedback) fail("restart did not clear");
    repeat (50) @(posedge clk);
    start = 1;
    @(posedge clk); #1 start = 0;
    wait (finished);
    @(posedge clk); #1;
    checks++;
    if (n_reg2 != 2 * NS + 2) fail($sformatf("total samples %0d", n_reg2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
