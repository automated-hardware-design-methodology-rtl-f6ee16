// filt_pkg: constants and elaboration-time functions shared by the filters.
//
// - cic_reg_width(): register width of a CIC decimator, input width plus
//   ceil(N * log2(M * R)), so that the integrators may wrap in two's
//   complement while the comb output is still exact.
// - fir1_table(): a Hamming-windowed sinc low-pass, normalised to unity DC
//   gain and rounded to signed COEF_W-bit integers with COEF_W-1 fraction
//   bits. This is the usual windowed design (the classic "fir1" recipe); the
//   cutoff is relative to the Nyquist frequency (0 < cutoff <= 1). Entries from
//   index taps up to MAX_TAPS-1 are zero, which is the coefficient padding the
//   polyphase filter relies on.
// Everything here is evaluated while the design is elaborated; no hardware is
// built from the real-valued arithmetic.
package filt_pkg;

  // Largest number of coefficients a filter in this library can hold
  // (after zero padding to a multiple of the decimation rate).
  localparam int MAX_TAPS = 256;

  typedef int coef_table_t [MAX_TAPS];

  localparam real PI = 3.14159265358979323846;

  // ceil(log2(v)) for v >= 1, on 64-bit values.
  function automatic int clog2_64(longint unsigned v);
    int r = 0;
    longint unsigned p = 1;
    while (p < v) begin
      p = p << 1;
      r++;
    end
    return r;
  endfunction

  // Register width of a CIC filter: in_w + ceil(n * log2(m * r)).
  function automatic int cic_reg_width(int in_w, int n, int r, int m);
    longint unsigned g = 1;
    for (int i = 0; i < n; i++) g = g * longint'(m * r);
    return in_w + clog2_64(g);
  endfunction

  // Sine by argument reduction to [-pi, pi] and a Taylor series.
  function automatic real sin_r(real x);
    real t, s, xx;
    while (x > PI) x = x - 2.0 * PI;
    while (x < -PI) x = x + 2.0 * PI;
    xx = x * x;
    t = x;
    s = x;
    for (int k = 1; k < 20; k++) begin
      t = -t * xx / real'((2 * k) * (2 * k + 1));
      s = s + t;
    end
    return s;
  endfunction

  function automatic real cos_r(real x);
    return sin_r(x + PI / 2.0);
  endfunction

  // Ideal low-pass impulse response times a Hamming window, tap k of taps.
  function automatic real fir1_real(int taps, int k, real cutoff);
    real mid, t, h, w;
    mid = real'(taps - 1) / 2.0;
    t   = real'(k) - mid;
    if (t == 0.0) h = cutoff;
    else          h = sin_r(PI * cutoff * t) / (PI * t);
    if (taps > 1) w = 0.54 - 0.46 * cos_r(2.0 * PI * real'(k) / real'(taps - 1));
    else          w = 1.0;
    return h * w;
  endfunction

  // Quantised coefficient table, zero beyond index taps-1.
  function automatic coef_table_t fir1_table(int taps, real cutoff, int coef_w);
    coef_table_t tbl;
    real sum, v, scale;
    sum = 0.0;
    for (int k = 0; k < taps; k++) sum = sum + fir1_real(taps, k, cutoff);
    scale = real'(longint'(1) << (coef_w - 1));
    for (int k = 0; k < MAX_TAPS; k++) begin
      if (k < taps) begin
        v = fir1_real(taps, k, cutoff) / sum * scale;
        tbl[k] = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
        // keep the value representable on coef_w bits
        if (tbl[k] > int'(scale) - 1) tbl[k] = int'(scale) - 1;
      end else begin
        tbl[k] = 0;
      end
    end
    return tbl;
  endfunction

  // True when the first taps entries are mirror-symmetric (linear phase).
  function automatic bit is_symmetric(coef_table_t tbl, int taps);
    for (int k = 0; k < taps; k++)
      if (tbl[k] != tbl[taps - 1 - k]) return 1'b0;
    return 1'b1;
  endfunction

endpackage
