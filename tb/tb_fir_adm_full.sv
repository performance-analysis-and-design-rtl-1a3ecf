// tb_fir_adm_full: the FIR ADM filter at its default parameters (60 taps,
// one channel, 16-bit coefficients, levels 0..10, leak 0.875) running the
// evaluation of the design: 6000 samples per input level, the first 1000
// left out of the signal-to-quantization-noise ratio (SQNR), for flat and
// RC-shaped band-limited inputs at rms levels from 0.0003 to 0.25 of full
// scale. The filter is reset before each run. Every output is compared
// with the bit-exact model in fir_adm_ref_pkg, the sample period is the
// shortest the filter accepts, and the SQNR of each run is printed. Above
// the word-length threshold (rms 0.003 and more) the SQNR must exceed 7 dB for flat and
// 12 dB for RC-shaped inputs.
module tb_fir_adm_full;
  import adm_pkg::*;
  import fir_adm_ref_pkg::*;
  localparam int N_TAPS = 60, COEF_W = 16, L_MAX = 10, DELTA_MAX = 8192, LEAK_M = 3;
  localparam int N_SAMP = 6000, SKIP = 1000;
  localparam int N_LEVELS = 7;
  localparam real SIGMA [N_LEVELS] = '{0.0003, 0.001, 0.003, 0.01, 0.03, 0.1, 0.25};

  logic clk = 0, rst_n = 0, sample_en = 0;
  logic signed [15:0] x_in [1];
  logic ready, overrun, y_valid;
  logic adm_bit [1];
  logic signed [23:0] y [1];

  fir_adm_filter dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int g_sm [];
    channel_model m;
    tone_source src;
    int xv, cyc, period;
    real yi;
    load_coefs("rtl/coeff_g.hex", N_TAPS/2, COEF_W, g_sm);
    x_in[0] = '0;
    for (int rc = 0; rc < 2; rc++) begin
      for (int lv = 0; lv < N_LEVELS; lv++) begin
        m = new(N_TAPS, L_MAX, DELTA_MAX, LEAK_M, COEF_W, g_sm);
        src = new(SIGMA[lv] * 32768.0, rc[0]);
        rst_n = 0;
        repeat (2) @(negedge clk);
        rst_n = 1;
        @(negedge clk);
        for (int k = 0; k < N_SAMP; k++) begin
          xv = src.next(k);
          x_in[0] = 16'(xv);
          void'(m.sample(xv));
          yi = m.ideal(real'(xv));
          if (k >= SKIP) m.score(yi); else m.yi_prev = yi;
          check(ready, "ready at the start of a sample period");
          sample_en = 1;
          @(negedge clk); sample_en = 0;
          cyc = 1;
          while (!y_valid) begin @(negedge clk); cyc++; end
          check(longint'(y[0]) == m.y, $sformatf("k=%0d y=%0d exp %0d", k, y[0], m.y));
          period = cyc;
          // next sample as soon as ready (ready rises the cycle before y_valid)
        end
        check(period == 3 + 1 + N_TAPS + 3, $sformatf("latency %0d", period));
        $display("%s rms %6.4f: SQNR %5.1f dB", rc ? "RC-shaped" : "flat     ", SIGMA[lv], m.sqnr_db());
        if (SIGMA[lv] >= 0.003) check(m.sqnr_db() > (rc ? 12.0 : 7.0), "SQNR above 7 dB (flat) or 12 dB (RC-shaped)");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
