// level_counter: presettable saturating up/down counter for the step level.
//
// The filter does not store the 4-bit level of every past sample. It keeps
// the level of the oldest sample in one counter, L(k-N+1), and rebuilds the
// level of each younger sample in a second counter, L(k-i), by replaying the
// stored one-bit directions with the same saturating rule the coder used
// (adm_pkg::next_level). Both counters are instances of this module. Preset
// and replay follow the source design's counter pair; the exact control
// (load wins over step) is this design's choice.
//
// Interface: load presets the count to load_val; otherwise step moves it one
// place in direction up, holding at 0 and at L_MAX. The count is registered.
// Reset value: L_MAX, the level the coder starts from.
module level_counter
  import adm_pkg::*;
#(
  parameter int unsigned L_MAX = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  level_t load_val,
  input  logic   step,
  input  logic   up,
  output level_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= level_t'(L_MAX);
    else if (load) q <= load_val;
    else if (step) q <= next_level(q, up, level_t'(L_MAX));
  end

endmodule
