// map_sequencer: control of one iteration of the exponential map.
//
// One sample x(n+1) = lambda x(n) exp(-x(n)) takes three phases: the Horner
// unit evaluates exp(-x) (20 cycles), Register 1 captures x and exp(-x),
// Register 2 captures the product with lambda.  This state machine issues
// the enables for those phases, holds the "FF D" flag that switches the
// input mux from the initial condition x0 to the fed-back sample after the
// first exponential, and counts samples (counter 0 .. N_SAMPLES-1); when
// the count is reached Register 2 is no longer written and `finished`
// rises.  In the source design the same ordering is obtained by delaying
// clocks ("Delay", "Delay Map"); enables on one clock are this design's
// choice, as is waiting for `start` after reset.
//
// Timing, per sample: exp_start (1 cycle, first Horner step), 19 more
// Horner steps, reg1_load in the cycle exp_done is high, reg2_load in the
// next cycle, then exp_start again: one sample every 22 clock cycles.
// `start` restarts the sequence from x0 at any time.
module map_sequencer
  import prng_pkg::*;
#(
  parameter int unsigned N_SAMPLES_P = N_SAMPLES,
  localparam int unsigned CW = $clog2(N_SAMPLES_P + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          exp_done,
  output logic          exp_start,
  output logic          reg1_load,
  output logic          reg2_load,
  output logic          sel_feedback,
  output logic [CW-1:0] sample_count,
  output logic          finished
);

  typedef enum logic [2:0] {
    S_IDLE, S_EXP_START, S_EXP_WAIT, S_REG2, S_DONE
  } state_t;

  state_t state;

  assign exp_start = (state == S_EXP_START);
  assign reg1_load = (state == S_EXP_WAIT) && exp_done;
  // Register 2 is gated off once the sample counter has reached its limit
  assign reg2_load = (state == S_REG2) && (sample_count != CW'(N_SAMPLES_P));
  assign finished  = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      sel_feedback <= 1'b0;
      sample_count <= '0;
    end else if (start) begin
      state        <= S_EXP_START;
      sel_feedback <= 1'b0;
      sample_count <= '0;
    end else begin
      unique case (state)
        S_IDLE:      ;
        S_EXP_START: state <= S_EXP_WAIT;
        S_EXP_WAIT:  if (exp_done) begin
                       state        <= S_REG2;
                       sel_feedback <= 1'b1;
                     end
        S_REG2: begin
          if (reg2_load) sample_count <= sample_count + 1'b1;
          state <= (sample_count >= CW'(N_SAMPLES_P - 1)) ? S_DONE : S_EXP_START;
        end
        S_DONE:      ;
        default:     state <= S_IDLE;
      endcase
    end
  end

  // the sample counter never passes its limit
  assert property (@(posedge clk) disable iff (rst) sample_count <= CW'(N_SAMPLES_P));

endmodule
