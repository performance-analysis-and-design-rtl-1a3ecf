// fir_adm_ref_pkg: bit-exact reference model of one channel of the FIR ADM
// filter, for testbenches. It is written from the equations, not from the
// RTL: the CFDM coder
//     l(k)    = l(k-1) + 1 if b(k-1) != b(k-2), else l(k-1) - 1, kept in 0..L_MAX
//     xhat(k) = xhat(k-1) - floor(xhat(k-1) / 2^M) + (DELTA_MAX >> l(k)) * (+/-1 by b(k-1))
// (no leak term for M = 0)
//     b(k)    = x(k) >= xhat(k)
// the incremental output dy(k) = sum_i +/-floor(|G(i)| / 2^l(k-i)) over the
// stored samples, and the leaky accumulator y = y - floor(y / 2^M) + dy.
// It also keeps an ideal real-valued FIR of the input x, for the
// signal-to-quantization-noise ratio, and counts events for coverage.
package fir_adm_ref_pkg;

  // Coefficient words of a given length from the 24-bit master table:
  // magnitude rounded half up to coef_w-1 bits, sign kept.
  function automatic void load_coefs(string file, int n_half, int coef_w, ref int g_sm []);
    logic [23:0] master [256];
    longint mag;
    $readmemh(file, master, 0, n_half - 1);
    g_sm = new[n_half];
    for (int i = 0; i < n_half; i++) begin
      mag = longint'(master[i] & 24'h7fffff);
      mag = (coef_w < 24) ? (mag + (longint'(1) << (23 - coef_w))) / (longint'(1) << (24 - coef_w)) : mag;
      g_sm[i] = int'(mag) | (int'(master[i][23]) << (coef_w - 1));
    end
  endfunction

  class channel_model;
    int n_taps, l_max, delta_max, leak_m, coef_w;
    int g_sm [];          // sign-magnitude coefficients, first half
    int b1, b2, lvl, xh;  // coder state
    int sgn_h [$];        // increment sign of samples k, k-1, ... (newest first)
    int lvl_h [$];
    real x_h [$];
    longint y;
    // statistics
    int n_up, n_down, n_hold0, n_holdmax, n_neg, n_pos, n_fill, n_samples;
    real sig2, err2, yi_prev;

    function new(int n_taps, int l_max, int delta_max, int leak_m, int coef_w, int g_sm []);
      this.n_taps = n_taps; this.l_max = l_max; this.delta_max = delta_max;
      this.leak_m = leak_m; this.coef_w = coef_w; this.g_sm = g_sm;
      b1 = 0; b2 = 0; lvl = l_max; xh = 0; y = 0;
      n_up = 0; n_down = 0; n_hold0 = 0; n_holdmax = 0; n_neg = 0; n_pos = 0;
      n_fill = 0; n_samples = 0; sig2 = 0.0; err2 = 0.0; yi_prev = 0.0;
    endfunction

    static function longint floordiv(longint a, longint d);
      return (a >= 0) ? a / d : -((-a + d - 1) / d);
    endfunction

    // the leak term floor(v / 2^M); M = 0 is the ideal integrator, no leak
    function longint leak(longint v);
      return (leak_m == 0) ? 0 : floordiv(v, longint'(1) << leak_m);
    endfunction

    // G(i) as a signed integer
    function int g_signed(int i);
      int j, mag;
      j = (i < n_taps / 2) ? i : n_taps - 1 - i;
      mag = g_sm[j] & ((1 << (coef_w - 1)) - 1);
      return ((g_sm[j] >> (coef_w - 1)) & 1) ? -mag : mag;
    endfunction

    // one sample: returns the coded bit; updates y
    function int sample(int x);
      int up, nl, st, b, dy, gi, mag, t;
      up = (b1 != b2);
      nl = up ? ((lvl < l_max) ? lvl + 1 : lvl) : ((lvl > 0) ? lvl - 1 : lvl);
      if (up) n_up++; else n_down++;
      if (nl == 0 && lvl == 0) n_hold0++;
      if (nl == l_max && lvl == l_max) n_holdmax++;
      st = delta_max >> nl;
      xh = int'(xh - leak(xh) + (b1 ? st : -st));
      b  = (x >= xh);
      sgn_h.push_front(b1);
      lvl_h.push_front(nl);
      if (sgn_h.size() > n_taps) begin void'(sgn_h.pop_back()); void'(lvl_h.pop_back()); end
      if (sgn_h.size() < n_taps) n_fill++;
      b2 = b1; b1 = b; lvl = nl;
      dy = 0;
      for (int i = 0; i < sgn_h.size(); i++) begin
        gi  = g_signed(i);
        mag = (gi < 0 ? -gi : gi) >> lvl_h[i];
        t   = ((gi < 0) == (sgn_h[i] == 0)) ? mag : -mag;
        if (t < 0) n_neg++; else if (t > 0) n_pos++;
        dy += t;
      end
      y = y - leak(y) + dy;
      n_samples++;
      return b;
    endfunction

    // ideal output sum h(i) x(k-i) in input units, h(i) = G(i) / 2^(coef_w+1)
    function real ideal(real x);
      real s = 0.0;
      x_h.push_front(x);
      if (x_h.size() > n_taps) void'(x_h.pop_back());
      for (int i = 0; i < x_h.size(); i++) s += real'(g_signed(i)) * x_h[i];
      return s / real'(longint'(1) << (coef_w + 1));
    endfunction

    // accumulate the squared error of the model output against the ideal one.
    // The coder's prediction xhat(k) is formed before x(k) is seen, so the
    // filtered output follows the ideal one by one sample; compare with that.
    function void score(real y_ideal);
      real yr;
      yr = real'(y) * real'(delta_max) / real'(longint'(1) << (coef_w + 1));
      sig2 += yi_prev * yi_prev;
      err2 += (yr - yi_prev) * (yr - yi_prev);
      yi_prev = y_ideal;
    endfunction

    function real sqnr_db();
      return (err2 > 0.0) ? 10.0 * $log10(sig2 / err2) : 99.0;
    endfunction
  endclass

  // band-limited Gaussian-like test signal: a sum of tones below 4 kHz at a
  // sample rate fs (default 32 kHz) with random frequencies and phases, rms = sigma (in
  // input LSBs). Flat: equal tone amplitudes. RC-shaped: amplitudes of a
  // one-pole low-pass with its 3 dB point at 0.23 x 4 kHz = 920 Hz.
  class tone_source;
    real f [16], ph [16], amp [16];
    function new(real sigma_lsb, bit rc_shaped = 0, real fs = 32000.0);
      real p = 0.0;
      for (int t = 0; t < 16; t++) begin
        f[t]   = (50.0 + 3900.0 * real'($urandom_range(0, 10000)) / 10000.0) / fs;
        ph[t]  = 6.2831853 * real'($urandom_range(0, 10000)) / 10000.0;
        amp[t] = rc_shaped ? 1.0 / $sqrt(1.0 + (f[t] * fs / 920.0) ** 2) : 1.0;
        p += amp[t] * amp[t] / 2.0;
      end
      for (int t = 0; t < 16; t++) amp[t] = amp[t] * sigma_lsb / $sqrt(p);
    endfunction
    function int next(int k);
      real s = 0.0;
      for (int t = 0; t < 16; t++) s += amp[t] * $sin(6.2831853 * f[t] * real'(k) + ph[t]);
      if (s > 32767.0) s = 32767.0;
      if (s < -32768.0) s = -32768.0;
      return $rtoi(s);
    endfunction
  endclass

endpackage
