// coeff_shift_reg: circular shift register holding the Horner coefficients.
//
// Holds N words.  After reset the output `head` is COEF[N-1]; each `shift`
// moves the next lower coefficient to the head (N-2, ..., 0) and sends the
// head round to the tail, so after N shifts the register is back where it
// started and ready for the next evaluation.  This is the pre-computed
// coefficient store of the Horner unit: with N = 20 it presents a19 first
// and a0 last, in the order the recurrence b_i = b_{i-1} x + a_{20-i}
// consumes them.  Refilling by rotation is this design's choice.
//
// Interface: synchronous reset reloads COEF; `shift` acts on the clock edge.
module coeff_shift_reg #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 20,
  parameter logic [W-1:0] COEF [N] = '{default: '0}
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift,
  output logic [W-1:0] head
);

  logic [W-1:0] stage [N];   // stage[0] is the head

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) stage[i] <= COEF[N-1-i];
    end else if (shift) begin
      for (int i = 0; i < N-1; i++) stage[i] <= stage[i+1];
      stage[N-1] <= stage[0];
    end
  end

  assign head = stage[0];

endmodule
