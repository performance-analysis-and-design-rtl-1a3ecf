// adm_pkg: types and helpers shared by the FIR ADM filter.
//
// The step size of the constant-factor delta modulator is Delta_max * 2^-l,
// where the shift count l ("level") runs from 0 (largest step) to L_MAX
// (smallest step). Each sample the level moves one place: up (smaller step)
// when the last two sign bits differ, down (larger step) when they agree, and
// it stays put at either end of its range. That rule is next_level() below;
// the encoder and the filter's counters both use it, so a stored one-bit
// direction per sample is enough to rebuild every level later.
//
// hist_t is what the filter stores per sample and channel: the sign of the
// predictor increment (b(k-1)) and the direction bit of the level (the
// "delta-1" bit). The 4-bit level width holds any L_MAX up to 15.
package adm_pkg;

  localparam int unsigned LEVEL_W = 4;

  typedef logic [LEVEL_W-1:0] level_t;

  typedef struct packed {
    logic inc_sign;  // 1: increment +Delta(k), 0: increment -Delta(k)
    logic up;        // 1: level rose (or held at L_MAX), 0: level fell (or held at 0)
  } hist_t;

  // Saturating one-step update of the shift count.
  function automatic level_t next_level(level_t l, logic up, level_t lmax);
    if (up) return (l < lmax) ? level_t'(l + 1'b1) : l;
    else    return (l != '0)  ? level_t'(l - 1'b1) : l;
  endfunction

endpackage
