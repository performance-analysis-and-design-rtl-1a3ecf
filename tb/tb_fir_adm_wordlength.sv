// tb_fir_adm_wordlength: the word-length evaluation of the FIR ADM filter.
// Six filters with coefficient words of 8, 10, 12, 14, 16 and 18 bits (sums
// 8 bits wider) run side by side on the same input, 6000 samples per rms
// level from 0.0003 to 0.25 of full scale, for flat and RC-shaped
// band-limited inputs; the first 1000 samples are left out of the SQNR.
// Each filter's every output is compared with the bit-exact model at the
// same word length, and the SQNR table is printed. Checked trends: at the
// lowest levels longer words give a higher SQNR, and every length reaches
// at least 9 dB (RC-shaped) at rms 0.25.
module tb_fir_adm_wordlength;
  import adm_pkg::*;
  import fir_adm_ref_pkg::*;
  localparam int N_TAPS = 60, L_MAX = 10, DELTA_MAX = 8192, LEAK_M = 3;
  localparam int N_SAMP = 6000, SKIP = 1000;
  localparam int N_W = 6;
  localparam int WL [N_W] = '{8, 10, 12, 14, 16, 18};
  localparam int N_LEVELS = 7;
  localparam real SIGMA [N_LEVELS] = '{0.0003, 0.001, 0.003, 0.01, 0.03, 0.1, 0.25};

  logic clk = 0, rst_n = 0, sample_en = 0;
  logic signed [15:0] x_in [1];
  logic ready [N_W], y_valid [N_W];
  longint y_all [N_W];

  for (genvar w = 0; w < N_W; w++) begin : g_w
    logic overrun, rdy, yv;
    logic adm_bit [1];
    logic signed [WL[w]+7:0] y [1];
    fir_adm_filter #(.COEF_W(WL[w]), .ACC_W(WL[w] + 8), .Y_W(WL[w] + 8)) dut (
      .clk, .rst_n, .sample_en, .x_in, .ready(rdy), .overrun, .adm_bit, .y_valid(yv), .y);
    assign ready[w] = rdy;
    assign y_valid[w] = yv;
    assign y_all[w] = longint'(y[0]);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real sq [2][N_LEVELS][N_W];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int g_sm [N_W][];
    channel_model m [N_W];
    tone_source src;
    int xv;
    real yi;
    string line;
    for (int w = 0; w < N_W; w++) load_coefs("rtl/coeff_g.hex", N_TAPS/2, WL[w], g_sm[w]);
    x_in[0] = '0;
    for (int rc = 0; rc < 2; rc++) begin
      for (int lv = 0; lv < N_LEVELS; lv++) begin
        for (int w = 0; w < N_W; w++) m[w] = new(N_TAPS, L_MAX, DELTA_MAX, LEAK_M, WL[w], g_sm[w]);
        src = new(SIGMA[lv] * 32768.0, rc[0]);
        rst_n = 0;
        repeat (2) @(negedge clk);
        rst_n = 1;
        @(negedge clk);
        for (int k = 0; k < N_SAMP; k++) begin
          xv = src.next(k);
          x_in[0] = 16'(xv);
          for (int w = 0; w < N_W; w++) begin
            void'(m[w].sample(xv));
            yi = m[w].ideal(real'(xv));
            if (k >= SKIP) m[w].score(yi); else m[w].yi_prev = yi;
          end
          sample_en = 1;
          @(negedge clk); sample_en = 0;
          while (!y_valid[0]) @(negedge clk);
          for (int w = 0; w < N_W; w++) begin
            check(y_valid[w], "all word lengths finish together");
            check(y_all[w] == m[w].y, $sformatf("b=%0d k=%0d y=%0d exp %0d", WL[w], k, y_all[w], m[w].y));
          end
        end
        for (int w = 0; w < N_W; w++) sq[rc][lv][w] = m[w].sqnr_db();
      end
    end
    for (int rc = 0; rc < 2; rc++) begin
      $display("%s input, SQNR in dB; columns b = 8 10 12 14 16 18", rc ? "RC-shaped" : "flat");
      for (int lv = 0; lv < N_LEVELS; lv++) begin
        line = $sformatf("  rms %6.4f:", SIGMA[lv]);
        for (int w = 0; w < N_W; w++) line = {line, $sformatf(" %6.1f", sq[rc][lv][w])};
        $display("%s", line);
      end
      check(sq[rc][1][5] > sq[rc][1][0] + 6.0, "18-bit words beat 8-bit words at rms 0.001");
      check(sq[rc][2][4] > sq[rc][2][1] + 3.0, "16-bit words beat 10-bit words at rms 0.003");
    end
    for (int w = 0; w < N_W; w++) check(sq[1][6][w] > 9.0, $sformatf("b=%0d reaches 9 dB at rms 0.25", WL[w]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
