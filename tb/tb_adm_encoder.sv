// tb_adm_encoder: self-checking test of the CFDM coder.
// Feeds a sum of sinusoids, a step and silence, and compares every output
// with an integer model of xhat(k) = xhat(k-1) - floor(xhat(k-1)/2^M)
// + Delta(k) b(k-1), b(k) = [x(k) >= xhat(k)], and the step rule. Also checks
// that the prediction tracks a slow sinusoid and that valid follows
// sample_en by one cycle.
module tb_adm_encoder;
  import adm_pkg::*;
  localparam int X_W = 16, L_MAX = 10, LEAK_M = 3;
  parameter int DELTA_MAX = 8192;
  localparam int P_W = 18;

  logic clk = 0, rst_n = 0, sample_en = 0;
  logic signed [X_W-1:0] x = 0;
  logic valid, bit_out;
  hist_t hist;
  level_t level;
  logic signed [P_W-1:0] xhat;
  int checks = 0, failures = 0;
  int m_b1, m_b2, m_lvl, m_xh, e_up, e_lvl, e_step, e_xh, e_b;
  longint err2 = 0, sig2 = 0;

  adm_encoder #(.X_W(X_W), .L_MAX(L_MAX), .DELTA_MAX(DELTA_MAX), .LEAK_M(LEAK_M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int floordiv(int a, int d);
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  initial begin
    real ph;
    m_b1 = 0; m_b2 = 0; m_lvl = L_MAX; m_xh = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      ph = 2.0 * 3.14159265 * n;
      if (n < 2000)      x = X_W'($rtoi(8000.0 * $sin(ph * 500.0 / 32000.0) + 3000.0 * $sin(ph * 2300.0 / 32000.0)));
      else if (n < 2500) x = 16'sd20000;
      else if (n < 3000) x = -16'sd20000;
      else               x = 0;
      sample_en = 1;
      // model
      e_up   = (m_b1 != m_b2);
      e_lvl  = e_up ? ((m_lvl < L_MAX) ? m_lvl + 1 : m_lvl) : ((m_lvl > 0) ? m_lvl - 1 : m_lvl);
      e_step = DELTA_MAX >> e_lvl;
      e_xh   = m_xh - floordiv(m_xh, 1 << LEAK_M) + (m_b1 ? e_step : -e_step);
      e_b    = (int'(x) >= e_xh);
      @(posedge clk); #1;
      sample_en = 0;
      check(valid == 1'b1, "valid");
      check(bit_out == e_b, $sformatf("b at %0d", n));
      check(int'(xhat) == e_xh, $sformatf("xhat %0d exp %0d at %0d", xhat, e_xh, n));
      check(level == e_lvl, "level");
      check(hist.inc_sign == m_b1 && hist.up == e_up, "hist");
      if (n > 200 && n < 2000) begin
        err2 += (longint'(x) - e_xh) ** 2; sig2 += longint'(x) ** 2;
      end
      m_b2 = m_b1; m_b1 = e_b; m_lvl = e_lvl; m_xh = e_xh;
      @(posedge clk); #1;
      check(valid == 1'b0, "valid is a pulse");
    end
    // the coder must follow the input: prediction error well below the signal
    $display("tracking SNR %0.1f dB", 10.0 * $log10(real'(sig2) / real'(err2)));
    check(real'(sig2) / real'(err2) > 3.16, "tracking SNR above 5 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
