// adm_encoder: constant-factor adaptive delta modulation (CFDM) coder, in
// discrete time.
//
// For each input sample x(k) the coder forms the prediction
//     xhat(k) = beta * xhat(k-1) + Delta(k) * b(k-1),   beta = 1 - 2^-LEAK_M
// and sends the sign bit b(k) = sgn(x(k) - xhat(k)) (1 for x >= xhat, else 0).
// Delta(k) = DELTA_MAX * 2^-l(k) comes from adm_step_logic. The analog loop of
// a hardware coder (comparator, D/A converter, sign changing unit, RC leaky
// integrator) is modelled here by its sampled equivalent with integer
// arithmetic: the comparator is a signed compare and the leak is a subtraction
// of xhat >>> LEAK_M (arithmetic shift, so the leak rounds toward minus
// infinity). LEAK_M = 0 selects an ideal integrator (beta = 1, no leak),
// which the source design names as the alternative to the leaky one. The leak
// 1 - 2^-3 = 0.875 and the step law follow the source design; the word widths, DELTA_MAX = 0.25 of full scale (the largest
// input rms, so the smallest step, 2^-10 of it, still follows inputs of rms
// 0.0003) and sgn(0) = +1 are this design's choices.
//
// Interface: x is a signed X_W-bit sample, full scale +/-2^(X_W-1). On a cycle
// with sample_en high the coder codes x; one cycle later valid pulses and the
// registered outputs hold b(k), the increment sign b(k-1), the delta-1 bit,
// the level l(k) and xhat(k). The prediction register is P_W bits wide,
// enough for |xhat| <= DELTA_MAX * 2^LEAK_M and for the input range plus a
// few largest steps of overshoot (the bound that holds for LEAK_M = 0).
module adm_encoder
  import adm_pkg::*;
#(
  parameter int unsigned X_W       = 16,
  parameter int unsigned L_MAX     = 10,
  parameter int unsigned DELTA_MAX = 8192,
  parameter int unsigned LEAK_M    = 3,
  // prediction width: sign, |xhat| <= DELTA_MAX * 2^LEAK_M, and the input range
  localparam int unsigned P_W      = ((X_W > $clog2(DELTA_MAX) + LEAK_M) ? X_W : $clog2(DELTA_MAX) + LEAK_M) + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample_en,
  input  logic signed [X_W-1:0] x,
  output logic                  valid,
  output logic                  bit_out,   // b(k)
  output hist_t                 hist,      // {b(k-1), delta-1 bit} for the filter
  output level_t                level,     // l(k)
  output logic signed [P_W-1:0] xhat       // xhat(k)
);

  logic                  sign_prev, up, b_new;
  level_t                level_now;
  logic [P_W-1:0]        step;
  logic signed [P_W-1:0] xhat_q, xhat_now, inc, leak;

  adm_step_logic #(
    .STEP_W   (P_W),
    .L_MAX    (L_MAX),
    .DELTA_MAX(DELTA_MAX)
  ) u_step (
    .clk, .rst_n, .sample_en, .b_new,
    .sign_prev, .up, .level(level_now), .step
  );

  always_comb begin
    // sign changing unit
    inc      = sign_prev ? $signed(step) : -$signed(step);
    // leaky integrator
    if (LEAK_M == 0) leak = '0;
    else             leak = xhat_q >>> LEAK_M;
    xhat_now = xhat_q - leak + inc;
    // one-bit quantizer
    b_new    = (P_W'(x) >= xhat_now);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xhat_q  <= '0;
      valid   <= 1'b0;
      bit_out <= 1'b0;
      hist    <= '0;
      level   <= level_t'(L_MAX);
    end else begin
      valid <= sample_en;
      if (sample_en) begin
        xhat_q  <= xhat_now;
        bit_out <= b_new;
        hist    <= '{inc_sign: sign_prev, up: up};
        level   <= level_now;
      end
    end
  end

  assign xhat = xhat_q;

  initial assert (DELTA_MAX * (2 ** LEAK_M) < 2 ** (P_W - 1))
    else $error("DELTA_MAX too large for the prediction register");

endmodule
