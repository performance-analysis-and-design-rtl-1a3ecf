// adm_step_logic: step-size logic of the constant-factor delta modulator.
//
// Two flip-flops hold the last two sign bits b(k-1) and b(k-2). The control
// pulse generator compares them: differing bits mean the coder is hunting
// around the input, so the step is halved (level + 1); equal bits mean it is
// falling behind, so the step is doubled (level - 1). The up/down counter holds
// the level l(k) in 0..L_MAX and saturates at both ends; the decoder turns it
// into the step magnitude DELTA_MAX >> l(k). The step factors 2 and 1/2, the
// flip-flop / pulse-generator / counter / decoder chain and L_MAX = 10 follow
// the source design; register widths, the reset state and the single-cycle
// timing are this design's choice.
//
// Timing: up, level and step are combinational for the sample being coded
// (they depend only on stored state). On a cycle with sample_en high the
// flip-flops take b_new and the counter takes the new level.
// Reset: b(k-1) = b(k-2) = 0 and level = L_MAX (smallest step).
module adm_step_logic
  import adm_pkg::*;
#(
  parameter int unsigned STEP_W    = 18,
  parameter int unsigned L_MAX     = 10,
  parameter int unsigned DELTA_MAX = 8192
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sample_en,
  input  logic              b_new,      // sign bit b(k) from the comparator
  output logic              sign_prev,  // b(k-1): sign of this sample's increment
  output logic              up,         // delta-1 bit: direction of the level change
  output level_t            level,      // l(k)
  output logic [STEP_W-1:0] step        // Delta(k) = DELTA_MAX >> l(k)
);

  localparam level_t LMAX = level_t'(L_MAX);

  logic   b1_q, b2_q;
  level_t level_q;

  // control pulse generator
  assign up        = b1_q ^ b2_q;
  assign sign_prev = b1_q;
  // up/down counter next state
  assign level     = next_level(level_q, up, LMAX);
  // decoder
  assign step      = STEP_W'(DELTA_MAX) >> level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1_q    <= 1'b0;
      b2_q    <= 1'b0;
      level_q <= LMAX;
    end else if (sample_en) begin
      b2_q    <= b1_q;
      b1_q    <= b_new;
      level_q <= level;
    end
  end

  initial assert (L_MAX < 2 ** LEVEL_W) else $error("L_MAX does not fit the level counter");

endmodule
