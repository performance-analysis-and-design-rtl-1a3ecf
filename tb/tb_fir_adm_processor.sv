// tb_fir_adm_processor: two channels of random coder words through the
// processor. A model keeps each channel's increment signs and levels
// (level(k) from level(k-1) and the delta-1 bit, starting from L_MAX) and
// computes dy(k) = sum_i +/- floor(|G(i)| / 2^level(k-i)) directly, with no
// terms for samples before the first. Checks every dy, its channel tag and
// the cycle on which it appears, including the start-up and ring wrap-around.
module tb_fir_adm_processor;
  import adm_pkg::*;
  import fir_adm_ref_pkg::load_coefs;
  localparam int N_TAPS = 60, N_CH = 2, COEF_W = 16, ACC_W = 24, L_MAX = 10;
  localparam int N_SAMP = 300;

  logic clk = 0, rst_n = 0, start = 0;
  hist_t hist_in [N_CH];
  logic busy, dy_valid;
  logic [0:0] dy_ch;
  logic signed [ACC_W-1:0] dy;

  int g [];
  int sgn [N_CH][N_SAMP];
  int lvl [N_CH][N_SAMP];
  int checks = 0, failures = 0, got = 0, sat0 = 0, satmax = 0;

  fir_adm_processor #(.N_TAPS(N_TAPS), .N_CH(N_CH), .COEF_W(COEF_W), .ACC_W(ACC_W),
                      .L_MAX(L_MAX), .INIT_FILE("rtl/coeff_g.hex")) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int model_dy(int c, int k);
    int s = 0, gi, mag, t;
    for (int i = 0; i < N_TAPS; i++) begin
      if (k - i < 0) break;
      gi  = (i < N_TAPS/2) ? i : N_TAPS - 1 - i;
      mag = (g[gi] & ((1 << (COEF_W - 1)) - 1)) >> lvl[c][k-i];
      t   = (((g[gi] >> (COEF_W - 1)) & 1) == sgn[c][k-i]) ? -mag : mag;
      s  += t;
    end
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int prev, up, cyc;
    load_coefs("rtl/coeff_g.hex", N_TAPS/2, COEF_W, g);
    for (int c = 0; c < N_CH; c++) hist_in[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < N_SAMP; k++) begin
      for (int c = 0; c < N_CH; c++) begin
        // bursts of repeated and alternating directions drive the level to both ends
        up = ((k / 25) % 2 == 0) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
        prev = (k == 0) ? L_MAX : lvl[c][k-1];
        lvl[c][k] = up ? ((prev < L_MAX) ? prev + 1 : prev) : ((prev > 0) ? prev - 1 : prev);
        if (lvl[c][k] == 0) sat0++;
        if (lvl[c][k] == L_MAX && prev == L_MAX && k > 0) satmax++;
        sgn[c][k] = $urandom_range(0, 1);
        hist_in[c] = '{inc_sign: 1'(sgn[c][k]), up: 1'(up)};
      end
      start = 1;
      @(negedge clk); start = 0;
      check(busy, "busy after start");
      cyc = 1;
      for (int c = 0; c < N_CH; c++) begin
        while (!dy_valid) begin @(negedge clk); cyc++; end
        check(int'(dy) == model_dy(c, k), $sformatf("k=%0d ch=%0d dy=%0d exp %0d", k, c, dy, model_dy(c, k)));
        check(dy_ch == 1'(c), "dy channel");
        check(cyc == 1 + N_CH + (c + 1) * N_TAPS + 3, $sformatf("dy cycle %0d", cyc));
        got++;
        @(negedge clk); cyc++;
      end
      check(!busy, "idle after the last dy");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    check(got == N_SAMP * N_CH, "all dy seen");
    check(sat0 > 0 && satmax > 0, "level reached both ends");
    $display("levels at 0: %0d, held at L_MAX: %0d", sat0, satmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
