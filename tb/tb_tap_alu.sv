// tb_tap_alu: random sums of shifted sign-magnitude terms against an integer
// model: term = +/- floor(|G| / 2^l), sign = G's sign XOR not(increment sign).
module tb_tap_alu;
  import adm_pkg::*;
  localparam int COEF_W = 16, ACC_W = 24;
  logic clk = 0, rst_n = 0, en = 0, first = 0, use_tap = 0, inc_sign = 0;
  logic [COEF_W-1:0] coef = '0;
  level_t level = '0;
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0, m = 0, mag, t, nsub = 0, nadd = 0;

  tap_alu #(.COEF_W(COEF_W), .ACC_W(ACC_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      first = (n % 60 == 0);
      use_tap = ($urandom_range(0, 9) != 0);
      coef = COEF_W'($urandom);
      level = level_t'($urandom_range(0, 10));
      inc_sign = $urandom_range(0, 1);
      @(posedge clk); #1;
      if (en) begin
        mag = int'(coef[COEF_W-2:0]) >>> int'(level);
        t = (coef[COEF_W-1] == inc_sign) ? -mag : mag;
        if (first) m = 0;
        if (use_tap) begin m += t; if (t < 0) nsub++; else nadd++; end
        checks++;
        if (int'(acc) != m) begin failures++; if (failures < 10) $display("FAIL acc=%0d exp %0d", acc, m); end
      end
    end
    checks++; if (nsub == 0 || nadd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
