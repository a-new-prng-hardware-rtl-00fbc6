// lfsr: Fibonacci linear feedback shift register used to perturb the map.
//
// The register shifts towards its most significant bit on every step; the
// new bit 0 is the XOR of the bits selected by TAPS (bit k-1 of TAPS for
// tap k of the feedback polynomial).  All flip-flops are presented
// concatenated on `state` (bit W-1 is the oldest).  In the PRNG the state
// is XORed onto the map output, as the source design does with its
// 20-stage (binary32) and 64-stage (fixed-point) registers.  The feedback
// polynomials and seeds are this design's choice: maximal-length taps by
// default, x^20+x^17+1, and x^64+x^63+x^61+x^60+1 for W = 64.
//
// STEPS sets how many shifts one `step` performs (the feedback is unrolled
// STEPS times in one clock), so a register stepped once per sample can
// follow the same sequence as one clocked every cycle.
//
// Interface: synchronous reset to SEED (must be non-zero); `step` advances
// STEPS states at the next clock edge.
module lfsr #(
  parameter int unsigned    W    = 20,
  parameter logic [W-1:0]   TAPS = W'(20'h90000),
  parameter logic [W-1:0]   SEED = W'(20'hA5A5A),
  parameter int unsigned    STEPS = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         step,
  output logic [W-1:0] state
);

  logic [W-1:0] next;

  always_comb begin
    next = state;
    for (int unsigned i = 0; i < STEPS; i++) next = {next[W-2:0], ^(next & TAPS)};
  end

  always_ff @(posedge clk) begin
    if (rst)       state <= SEED;
    else if (step) state <= next;
  end

endmodule
