// fir_adm_filter: FIR digital filter with adaptive delta modulation input.
//
// A filter y(k) = sum h(i) x(k-i) is computed on the differences of its
// input: the delta modulator sends, per sample, only a sign bit and a
// one-bit step-size change, so each filter term is a stored coefficient
// shifted right by the step level and added or subtracted. A leaky
// accumulator integrates the incremental output back to the filtered signal.
// N_CH channels share one processor, ROM and RAM in time multiplex; each
// channel has its own coder and output latch.
//
//   x_in[c] --> adm_encoder[c] --hist--> fir_adm_processor --dy--> leaky_accumulator --> y[c]
//                                         (history_ram, coeff_rom,
//                                          level_counter x2, tap_alu)
//
// Defaults follow the source design where it gives a number: 60 taps, shift
// levels 0..10 (60 dB step range), leak beta = 1 - 2^-3 = 0.875 (LEAK_M = 0
// gives the ideal accumulator, beta = 1, in coder and output alike), one
// channel. DELTA_MAX = 0.25 of full scale (the largest input rms), the word
// widths (16-bit input and coefficients, 24-bit sums) and the sample
// handshake are this design's choices. The coefficient table is a 60-tap
// equiripple low-pass for a 32 kHz sample rate (pass band to 2.5 kHz, stop
// band from 3.4 kHz).
//
// Interface and timing: raise sample_en for one cycle while ready is high,
// with the channels' samples on x_in. adm_bit shows the coded sign bits one
// cycle later. y_valid pulses when every channel's y has been updated,
// 3 + N_CH + N_CH * N_TAPS + 3 cycles after sample_en; ready rises again in the
// cycle before, so a sample period must be at least 5 + N_CH * (N_TAPS + 1)
// clock cycles (a 2.11 MHz clock for one channel at 32 kHz). A sample_en while
// ready is low is dropped and flagged by a one-cycle overrun pulse.
// Output scale: y = (sum h(i) xhat(k-i)) * 2^(COEF_W+1) / DELTA_MAX, i.e.
// 2^17 / 8192 = 16 times the input scale at the defaults.
module fir_adm_filter
  import adm_pkg::*;
#(
  parameter int unsigned N_TAPS    = 60,
  parameter int unsigned N_CH      = 1,
  parameter int unsigned X_W       = 16,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned L_MAX     = 10,
  parameter int unsigned DELTA_MAX = 8192,
  parameter int unsigned LEAK_M    = 3,
  parameter int unsigned ACC_W     = 24,
  parameter int unsigned Y_W       = 24,
  parameter string       INIT_FILE = "rtl/coeff_g.hex"
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample_en,
  input  logic signed [X_W-1:0] x_in    [N_CH],
  output logic                  ready,
  output logic                  overrun,
  output logic                  adm_bit [N_CH],
  output logic                  y_valid,
  output logic signed [Y_W-1:0] y       [N_CH]
);

  localparam int unsigned CH_W = (N_CH > 1) ? $clog2(N_CH) : 1;

  logic                  accept, pending;
  logic                  enc_valid [N_CH];
  hist_t                 hist      [N_CH];
  logic                  proc_busy, dy_valid, upd_last;
  logic [CH_W-1:0]       dy_ch;
  logic signed [ACC_W-1:0] dy;
  logic                  acc_upd;

  assign ready  = !proc_busy && !pending;
  assign accept = sample_en && ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      overrun  <= 1'b0;
      upd_last <= 1'b0;
    end else begin
      pending  <= accept;
      overrun  <= sample_en && !ready;
      upd_last <= dy_valid && (dy_ch == CH_W'(N_CH - 1));
    end
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_adm
    logic bit_c;

    adm_encoder #(
      .X_W(X_W), .L_MAX(L_MAX), .DELTA_MAX(DELTA_MAX), .LEAK_M(LEAK_M)
    ) u_adm (
      .clk, .rst_n,
      .sample_en(accept),
      .x        (x_in[c]),
      .valid    (enc_valid[c]),
      .bit_out  (bit_c),
      .hist     (hist[c]),
      .level    (),
      .xhat     ()
    );

    assign adm_bit[c] = bit_c;
  end

  fir_adm_processor #(
    .N_TAPS(N_TAPS), .N_CH(N_CH), .COEF_W(COEF_W), .ACC_W(ACC_W),
    .L_MAX(L_MAX), .INIT_FILE(INIT_FILE)
  ) u_proc (
    .clk, .rst_n,
    .start   (enc_valid[0]),
    .hist_in (hist),
    .busy    (proc_busy),
    .dy_valid,
    .dy_ch,
    .dy
  );

  leaky_accumulator #(
    .N_CH(N_CH), .ACC_W(ACC_W), .Y_W(Y_W), .LEAK_M(LEAK_M)
  ) u_acc (
    .clk, .rst_n,
    .en (dy_valid),
    .ch (dy_ch),
    .dy,
    .upd(acc_upd),
    .y
  );

  assign y_valid = upd_last;

endmodule
