// tb_adm_cfdm_sweep: performance of the CFDM coder on its own, against input
// level, leak factor and sample rate.
// Five coders with the default step range (DELTA_MAX = 8192, L_MAX = 10) and
// leak shifts LEAK_M = 0 .. 4 (beta = 1, i.e. an ideal integrator, and 0.5,
// 0.75, 0.875, 0.9375) code the
// same RC-shaped band-limited input (tones below 4 kHz), sampled at 32 kHz
// and at 48 kHz, at rms levels from 0.0003 to 0.25 of full scale. Every
// coded bit and every prediction is compared with the reference coder model.
// The coder's signal-to-noise ratio compares x(k) with the prediction
// xhat(k+1), the first one that includes the bit coded from x(k); the first
// 1000 samples of each run are not scored.
// The table printed at the end shows SQNR against level for each leak factor.
// This is the unfiltered coder error over the whole band up to fs/2, so it is
// well below the SQNR after the band-limiting FIR filter.
// Checks beyond bit exactness: each coder's SQNR at rms 0.03 exceeds its SQNR
// at rms 0.0003 and stays above 0 dB from rms 0.001 up (the adaptive step
// covers the range between); the used leak (beta = 0.875) reaches 4 dB at
// every level from 0.001 up, beats beta = 0.5 by more than 1 dB on average
// and beats the ideal integrator on average;
// sampling at 48 kHz beats 32 kHz on average. Only leaks 1 - 2^-m can be
// built, so beta values between these are not covered.
module tb_adm_cfdm_sweep;
  import adm_pkg::*;
  import fir_adm_ref_pkg::*;

  localparam int X_W = 16, L_MAX = 10, DELTA_MAX = 8192;
  localparam int N_M = 5;          // LEAK_M = 0 .. N_M-1
  localparam int N_LVL = 7;
  localparam int N_SMP = 5000, N_SKIP = 1000;
  localparam real LEVELS [N_LVL] = '{0.0003, 0.001, 0.003, 0.01, 0.03, 0.1, 0.25};
  localparam real RATES [2] = '{32000.0, 48000.0};

  logic clk = 0, rst_n = 0, sample_en = 0;
  logic signed [X_W-1:0] x = 0;
  logic        valid   [N_M];
  logic        bit_out [N_M];
  int          xh_dut  [N_M];
  int checks = 0, failures = 0;
  real sqnr [2][N_M][N_LVL];

  always #5 clk = ~clk;

  for (genvar g = 0; g < N_M; g++) begin : g_enc
    localparam int M   = g;
    localparam int P_W = ((X_W > $clog2(DELTA_MAX) + M) ? X_W : $clog2(DELTA_MAX) + M) + 2;
    hist_t                 hist;
    level_t                level;
    logic signed [P_W-1:0] xhat;

    adm_encoder #(.X_W(X_W), .L_MAX(L_MAX), .DELTA_MAX(DELTA_MAX), .LEAK_M(M)) u_enc (
      .clk, .rst_n, .sample_en, .x,
      .valid  (valid[g]),
      .bit_out(bit_out[g]),
      .hist, .level, .xhat
    );
    assign xh_dut[g] = int'(xhat);
  end

  initial begin
    repeat (2 * N_LVL * N_SMP * 4 + 10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int g0 [] = '{0};
    channel_model mdl [N_M];
    tone_source   src;
    real sig2 [N_M], err2 [N_M];
    int  xv, b;

    for (int r = 0; r < 2; r++) begin
      for (int lv = 0; lv < N_LVL; lv++) begin
        rst_n = 0;
        repeat (2) @(posedge clk);
        rst_n = 1;
        src = new(LEVELS[lv] * 32768.0, 1'b1, RATES[r]);
        for (int m = 0; m < N_M; m++) begin
          mdl[m]  = new(2, L_MAX, DELTA_MAX, m, 16, g0);
          sig2[m] = 0.0;
          err2[m] = 0.0;
        end
        for (int k = 0; k < N_SMP; k++) begin
          xv = src.next(k);
          @(negedge clk);
          x = X_W'(xv);
          sample_en = 1'b1;
          @(negedge clk);
          sample_en = 1'b0;
          for (int m = 0; m < N_M; m++) begin
            b = mdl[m].sample(xv);
            check(valid[m] == 1'b1, "valid one cycle after sample_en");
            check(int'(bit_out[m]) == b, $sformatf("bit m=%0d k=%0d", m, k));
            // prediction for the next sample, formed from this bit
            if (k >= N_SKIP) begin
              int up, nl, st, xn;
              up = (mdl[m].b1 != mdl[m].b2);
              nl = up ? ((mdl[m].lvl < L_MAX) ? mdl[m].lvl + 1 : mdl[m].lvl)
                      : ((mdl[m].lvl > 0) ? mdl[m].lvl - 1 : 0);
              st = DELTA_MAX >> nl;
              xn = int'(mdl[m].xh - mdl[m].leak(mdl[m].xh))
                   + (mdl[m].b1 ? st : -st);
              sig2[m] += real'(xv) * real'(xv);
              err2[m] += real'(xn - xv) * real'(xn - xv);
            end
          end
          @(negedge clk);
          for (int m = 0; m < N_M; m++)
            check(xh_dut[m] == mdl[m].xh, $sformatf("xhat m=%0d k=%0d", m, k));
        end
        for (int m = 0; m < N_M; m++)
          sqnr[r][m][lv] = (err2[m] > 0.0) ? 10.0 * $log10(sig2[m] / err2[m]) : 99.0;
      end
    end

    for (int r = 0; r < 2; r++) begin
      real avg [N_M];
      $display("CFDM coder, RC-shaped input, fs = %0d Hz, SQNR in dB", $rtoi(RATES[r]));
      $display("  rms      beta=1.0   0.5   0.75  0.875  0.9375");
      for (int lv = 0; lv < N_LVL; lv++)
        $display("  %6.4f  %6.1f %6.1f %6.1f %6.1f %6.1f", LEVELS[lv], sqnr[r][0][lv],
                 sqnr[r][1][lv], sqnr[r][2][lv], sqnr[r][3][lv], sqnr[r][4][lv]);
      for (int m = 0; m < N_M; m++) begin
        avg[m] = 0.0;
        for (int lv = 1; lv < N_LVL; lv++) avg[m] += sqnr[r][m][lv] / real'(N_LVL - 1);
        check(sqnr[r][m][4] > sqnr[r][m][0], $sformatf("fs=%0d m=%0d: 0.03 above 0.0003", r, m));
        for (int lv = 1; lv < N_LVL; lv++)
          check(sqnr[r][m][lv] > 0.0, $sformatf("fs=%0d m=%0d lv=%0d above 0 dB", r, m, lv));
      end
      for (int lv = 1; lv < N_LVL; lv++)
        check(sqnr[r][3][lv] > 4.0, $sformatf("fs=%0d beta=0.875 lv=%0d above 4 dB", r, lv));
      check(avg[3] > avg[1] + 1.0, $sformatf("fs=%0d beta=0.875 better than 0.5", r));
      check(avg[3] > avg[0], $sformatf("fs=%0d beta=0.875 better than the ideal integrator", r));
    end
    begin
      real a32 = 0.0, a48 = 0.0;
      for (int lv = 1; lv < N_LVL; lv++) begin
        a32 += sqnr[0][3][lv];
        a48 += sqnr[1][3][lv];
      end
      check(a48 > a32, "48 kHz sampling better than 32 kHz on average");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
