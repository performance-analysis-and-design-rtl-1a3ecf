// tb_coeff_rom: walks the tap counter over all 60 taps in both directions
// and checks that the folded address returns G(i) for i < 30 and G(59-i)
// for i >= 30, that the data appear one cycle after the counter and that
// the output holds while en is low. Spot values are checked literally too,
// at the default 16-bit words; a second instance with 10-bit words checks
// the rounding of the 24-bit master table. Finally, the 60 coefficients as
// read from the ROM are taken as a filter, and its magnitude response is
// evaluated at 32 kHz sampling: pass band 0-2.5 kHz, stop band 3.4-16 kHz.
// The stored low-pass must reach the specified 45 dB stop-band attenuation
// (measured from the nominal 0 dB gain);
// its pass-band ripple is measured and must stay under 1 dB (the
// specification asks 0.47 dB, which this 60-tap table does not reach).
module tb_coeff_rom;
  import fir_adm_ref_pkg::load_coefs;
  localparam int N_TAPS = 60, COEF_W = 16, HALF = 30, OFF = 2;
  logic clk = 0, en = 0;
  logic [5:0] cnt = '0;
  logic [COEF_W-1:0] coef;
  logic [9:0] coef10;
  int g [], g10 [];
  int checks = 0, failures = 0, j;
  int rd [N_TAPS];

  coeff_rom #(.N_TAPS(N_TAPS), .COEF_W(COEF_W), .INIT_FILE("rtl/coeff_g.hex")) dut (.*);
  coeff_rom #(.N_TAPS(N_TAPS), .COEF_W(10), .INIT_FILE("rtl/coeff_g.hex")) dut10 (.clk, .en, .cnt, .coef(coef10));
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load_coefs("rtl/coeff_g.hex", HALF, COEF_W, g);
    load_coefs("rtl/coeff_g.hex", HALF, 10, g10);
    for (int pass = 0; pass < 2; pass++) begin
      for (int n = 0; n < N_TAPS; n++) begin
        int i;
        i = pass ? (N_TAPS - 1 - n) : n;
        @(negedge clk); en = 1; cnt = 6'(i + OFF);
        @(posedge clk); #1;
        j = (i < HALF) ? i : N_TAPS - 1 - i;
        check(int'(coef) == g[j], $sformatf("tap %0d got %h exp %h", i, coef, g[j]));
        check(int'(coef10) == g10[j], $sformatf("10-bit tap %0d got %h exp %h", i, coef10, g10[j]));
        rd[i] = coef[COEF_W-1] ? -int'(coef[COEF_W-2:0]) : int'(coef[COEF_W-2:0]);
      end
    end
    // hold with en low
    @(negedge clk); en = 1; cnt = 6'(5 + OFF);
    @(posedge clk); #1;
    @(negedge clk); en = 0; cnt = 6'(29 + OFF);
    @(posedge clk); #1;
    check(int'(coef) == g[5], "hold while en low");
    // the centre taps 29 and 30 share one word, the end taps 0 and 59 another
    @(negedge clk); en = 1; cnt = 6'(30 + OFF); @(posedge clk); #1;
    check(int'(coef) == g[29], "tap 30 = tap 29");
    @(negedge clk); cnt = 6'(59 + OFF); @(posedge clk); #1;
    check(int'(coef) == g[0], "tap 59 = tap 0");
    check(coef == 16'h8029, "G(0) is -0x029 in sign-magnitude");
    @(negedge clk); cnt = 6'(29 + OFF); @(posedge clk); #1;
    check(coef == 16'h5a4e, "G(29), the centre tap, is +0x5a4e");
    check(coef10 == 10'h169, "10-bit G(29) is +0x169");
    // magnitude response of the stored filter
    begin
      real re, im, mag, pmax, pmin, smax, w, f;
      pmax = -1.0e9; pmin = 1.0e9; smax = -1.0e9;
      for (int n = 0; n <= 1600; n++) begin
        f = 10.0 * real'(n);
        w = 6.2831853 * f / 32000.0;
        re = 0.0; im = 0.0;
        for (int i = 0; i < N_TAPS; i++) begin
          re += real'(rd[i]) * $cos(w * real'(i));
          im -= real'(rd[i]) * $sin(w * real'(i));
        end
        mag = 10.0 * $log10((re * re + im * im) / (real'(1 << (COEF_W + 1)) ** 2) + 1.0e-30);
        if (f <= 2500.0) begin
          if (mag > pmax) pmax = mag;
          if (mag < pmin) pmin = mag;
        end
        if (f >= 3400.0 && mag > smax) smax = mag;
      end
      $display("stored filter: pass band %0.2f .. %0.2f dB (ripple %0.2f dB), stop band max %0.2f dB",
               pmin, pmax, pmax - pmin, smax);
      check(pmax - pmin < 1.0, "pass-band ripple under 1 dB");
      check(pmin > -1.0 && pmax < 1.0, "pass-band gain near 0 dB");
      check(smax <= -45.0, "stop band at least 45 dB below the nominal 0 dB gain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
