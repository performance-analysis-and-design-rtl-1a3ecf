// tb_level_counter: random preset/step sequences against a model of the
// saturating up/down count; counts holds at both ends.
module tb_level_counter;
  import adm_pkg::*;
  localparam int L_MAX = 10;
  logic clk = 0, rst_n = 0, load = 0, step = 0, up = 0;
  level_t load_val = '0, q;
  int checks = 0, failures = 0, m, hold_lo = 0, hold_hi = 0;

  level_counter #(.L_MAX(L_MAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1; checks++; if (q != L_MAX) begin failures++; $display("FAIL reset value"); end
    rst_n = 1; m = L_MAX;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      load = ($urandom_range(0, 19) == 0); load_val = level_t'($urandom_range(0, L_MAX));
      step = ($urandom_range(0, 3) != 0);
      up = (n % 400 < 200) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      @(posedge clk); #1;
      if (load) m = load_val;
      else if (step) begin
        if (up && m == L_MAX) hold_hi++;
        if (!up && m == 0) hold_lo++;
        m = up ? ((m < L_MAX) ? m + 1 : m) : ((m > 0) ? m - 1 : m);
      end
      checks++; if (q != m) begin failures++; if (failures < 10) $display("FAIL q=%0d exp %0d", q, m); end
    end
    checks++; if (hold_lo == 0 || hold_hi == 0) begin failures++; $display("FAIL saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
