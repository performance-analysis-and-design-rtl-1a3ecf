// tb_fir_adm_filter: end-to-end test of the FIR ADM filter with three
// time-shared channels.
//   ch0  band-limited tones, rms 0.25 of full scale (the largest level)
//   ch1  band-limited tones, rms 0.01 of full scale
//   ch2  near-silence (a 3-LSB offset: smallest step), then large steps
//        (slope overload, largest step), then near-silence again
// Every y of every channel is compared with the bit-exact model in
// fir_adm_ref_pkg, and the sample-to-y_valid latency with the documented
// 3 + N_CH + N_CH*N_TAPS + 3 cycles. One extra sample_en is sent while the
// filter is busy and must be dropped with an overrun pulse. The test counts
// each mechanism (step halving and doubling, level held at both ends,
// added and subtracted terms, start-up, ring wrap, leak, channel sharing,
// overrun) and fails if one never happens. It also reports the
// signal-to-quantization-noise ratio against an ideal filter of the input.
module tb_fir_adm_filter;
  import adm_pkg::*;
  import fir_adm_ref_pkg::*;
  localparam int N_TAPS = 60, N_CH = 3, X_W = 16, COEF_W = 16, L_MAX = 10;
  localparam int DELTA_MAX = 8192, LEAK_M = 3, ACC_W = 24, Y_W = 24;
  localparam int N_SAMP = 1500, SKIP = 200;
  localparam int LATENCY = 3 + N_CH + N_CH * N_TAPS + 3;

  logic clk = 0, rst_n = 0, sample_en = 0;
  logic signed [X_W-1:0] x_in [N_CH];
  logic ready, overrun, y_valid;
  logic adm_bit [N_CH];
  logic signed [Y_W-1:0] y [N_CH];

  fir_adm_filter #(.N_TAPS(N_TAPS), .N_CH(N_CH), .X_W(X_W), .COEF_W(COEF_W), .L_MAX(L_MAX),
                   .DELTA_MAX(DELTA_MAX), .LEAK_M(LEAK_M), .ACC_W(ACC_W), .Y_W(Y_W),
                   .INIT_FILE("rtl/coeff_g.hex")) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_overrun = 0, n_leak = 0, n_wrap = 0, n_ch_checked [N_CH];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic need(int count, string what);
    $display("  %-34s %0d", what, count);
    check(count > 0, {what, " never happened"});
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (overrun) n_overrun++;

  initial begin
    int g_sm [];
    channel_model m [N_CH];
    tone_source src0, src1;
    int xv [N_CH], cyc, bit_m [N_CH];
    real yi;
    load_coefs("rtl/coeff_g.hex", N_TAPS/2, COEF_W, g_sm);
    for (int c = 0; c < N_CH; c++) begin
      m[c] = new(N_TAPS, L_MAX, DELTA_MAX, LEAK_M, COEF_W, g_sm);
      x_in[c] = '0; n_ch_checked[c] = 0;
    end
    src0 = new(0.25 * 32768.0);
    src1 = new(0.01 * 32768.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < N_SAMP; k++) begin
      xv[0] = src0.next(k);
      xv[1] = src1.next(k);
      if (k < 400 || k >= 1200) xv[2] = 3;
      else xv[2] = ((k / 100) % 2) ? 30000 : -30000;
      while (!ready) @(negedge clk);
      for (int c = 0; c < N_CH; c++) begin
        x_in[c] = X_W'(xv[c]);
        bit_m[c] = m[c].sample(xv[c]);
        yi = m[c].ideal(real'(xv[c]));
        if (k >= SKIP) m[c].score(yi); else m[c].yi_prev = yi;
        if (m[c].y >= 8 || m[c].y < 0) n_leak++;
      end
      if (k >= N_TAPS) n_wrap++;
      sample_en = 1;
      @(negedge clk);
      sample_en = (k == 50);   // one request while busy: must be dropped
      cyc = 1;
      for (int c = 0; c < N_CH; c++) check(adm_bit[c] == 1'(bit_m[c]), $sformatf("adm bit k=%0d ch=%0d", k, c));
      @(negedge clk); sample_en = 0; cyc++;
      check(!ready, "busy while filtering");
      while (!y_valid) begin @(negedge clk); cyc++; end
      check(cyc == LATENCY, $sformatf("latency %0d, expected %0d", cyc, LATENCY));
      for (int c = 0; c < N_CH; c++) begin
        check(longint'(y[c]) == m[c].y, $sformatf("k=%0d ch=%0d y=%0d exp %0d", k, c, y[c], m[c].y));
        n_ch_checked[c]++;
      end
    end
    $display("mechanisms:");
    need(m[0].n_up + m[1].n_up + m[2].n_up,             "step halved (level up)");
    need(m[0].n_down + m[1].n_down + m[2].n_down,       "step doubled (level down)");
    need(m[0].n_hold0 + m[1].n_hold0 + m[2].n_hold0,    "largest step held (level 0)");
    need(m[0].n_holdmax + m[1].n_holdmax + m[2].n_holdmax, "smallest step held (L_MAX)");
    need(m[0].n_pos + m[1].n_pos + m[2].n_pos,          "terms added");
    need(m[0].n_neg + m[1].n_neg + m[2].n_neg,          "terms subtracted");
    need(m[0].n_fill,                                   "start-up samples");
    need(n_wrap,                                        "samples after ring wrap");
    need(n_leak,                                        "leak active");
    need(n_overrun,                                     "overrun (dropped request)");
    for (int c = 0; c < N_CH; c++) need(n_ch_checked[c], $sformatf("outputs of channel %0d", c));
    $display("SQNR ch0 (rms 0.25) %0.1f dB, ch1 (rms 0.01) %0.1f dB", m[0].sqnr_db(), m[1].sqnr_db());
    check(m[0].sqnr_db() > 9.0, "SQNR at rms 0.25 above 9 dB");
    check(m[1].sqnr_db() > 9.0, "SQNR at rms 0.01 above 9 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
