// tb_adm_step_logic: self-checking test of the CFDM step-size logic.
// Drives random and constant sign-bit runs and checks the delta-1 bit, level,
// step and increment sign against a separately written model of the rule:
// level rises (step halves) on alternating signs, falls (step doubles) on
// repeated signs, saturating at 0 and L_MAX. Counts both saturations.
module tb_adm_step_logic;
  import adm_pkg::*;
  localparam int L_MAX = 10, DELTA_MAX = 8192;

  logic clk = 0, rst_n = 0, sample_en = 0, b_new = 0;
  logic sign_prev, up;
  level_t level;
  logic [17:0] step;
  int checks = 0, failures = 0, sat_lo = 0, sat_hi = 0;
  int m_b1, m_b2, m_lvl, e_lvl, e_up;

  adm_step_logic #(.STEP_W(18), .L_MAX(L_MAX), .DELTA_MAX(DELTA_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    m_b1 = 0; m_b2 = 0; m_lvl = L_MAX;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      sample_en = ($urandom_range(0, 3) != 0);
      // phases: long runs, alternation, random
      if (n % 600 < 150)      b_new = 1'b1;
      else if (n % 600 < 300) b_new = (n % 2 == 0);
      else                    b_new = $urandom_range(0, 1);
      #1;
      e_up  = (m_b1 != m_b2);
      e_lvl = e_up ? ((m_lvl < L_MAX) ? m_lvl + 1 : m_lvl) : ((m_lvl > 0) ? m_lvl - 1 : m_lvl);
      check(up == e_up, "up");
      check(level == e_lvl, $sformatf("level %0d exp %0d", level, e_lvl));
      check(step == (DELTA_MAX >> e_lvl), "step");
      check(sign_prev == m_b1, "sign_prev");
      @(posedge clk);
      if (sample_en) begin
        if (e_lvl == 0 && m_lvl == 0) sat_lo++;
        if (e_lvl == L_MAX && m_lvl == L_MAX) sat_hi++;
        m_b2 = m_b1; m_b1 = b_new; m_lvl = e_lvl;
      end
    end
    check(sat_lo > 0, "level never held at 0");
    check(sat_hi > 0, "level never held at L_MAX");
    $display("saturations: at 0 %0d, at L_MAX %0d", sat_lo, sat_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
