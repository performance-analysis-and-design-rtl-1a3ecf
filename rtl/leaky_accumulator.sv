// leaky_accumulator: output integrator of the FIR ADM filter, one per channel.
//
// Turns the incremental output dy(k) back into the filtered signal:
//     y(k) = y(k-1) - 2^-LEAK_M * y(k-1) + dy(k),   i.e. T(z) = 1/(1 - beta z^-1)
// with beta = 1 - 2^-LEAK_M (0.875 for LEAK_M = 3). The shift by LEAK_M is
// pure wiring (an arithmetic right shift, rounding toward minus infinity),
// followed by a subtractor and an adder, so no multiplier is needed.
// LEAK_M = 0 gives an ideal accumulator (beta = 1): the truncation errors of
// the shifts then add up without decay, which is why the leaky form is the
// default. For
// several channels the state lives in one output latch per channel; a select
// picks the latch of the channel being updated and the sum is written back to
// that latch only. Leak factor 0.875, the subtractor/adder structure and the
// per-channel latches follow the source design; the widths, the
// wrap-around on overflow (none occurs at the default scaling) and reset to
// zero (the "preset") are this design's choices.
//
// Interface: on a cycle with en high, latch ch takes the new y; upd pulses
// one cycle later. y holds all channels' latches.
module leaky_accumulator #(
  parameter int unsigned N_CH   = 1,
  parameter int unsigned ACC_W  = 24,
  parameter int unsigned Y_W    = 24,
  parameter int unsigned LEAK_M = 3,
  localparam int unsigned CH_W  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [CH_W-1:0]         ch,
  input  logic signed [ACC_W-1:0] dy,
  output logic                    upd,
  output logic signed [Y_W-1:0]   y [N_CH]
);

  logic signed [Y_W-1:0] y_sel, leak, leaked, y_new;

  always_comb begin
    y_sel  = y[ch];                        // select
    if (LEAK_M == 0) leak = '0;            // ideal accumulator
    else             leak = y_sel >>> LEAK_M;   // shifter (wiring)
    leaked = y_sel - leak;                 // subtractor
    y_new  = leaked + Y_W'(dy);            // adder
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) y[c] <= '0;
      upd <= 1'b0;
    end else begin
      upd <= en;
      if (en) y[ch] <= y_new;
    end
  end

  initial assert (Y_W >= ACC_W) else $error("Y_W must be at least ACC_W");

endmodule
