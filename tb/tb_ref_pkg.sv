// tb_ref_pkg: reference arithmetic for the filter testbenches, written
// without reference to the RTL structure: plain convolutions on 64-bit
// integers, a CIC kernel built by repeated convolution of boxcars, and the
// output quantiser (round half up, then clip).
package tb_ref_pkg;

  typedef longint lq_t [$];

  // Value v scaled by 2^-shift with round-half-up, clipped to out_w bits.
  function automatic longint rnd_sat(longint v, int shift, int out_w, output bit sat);
    longint r, mx, mn;
    if (shift > 0) r = (v + (longint'(1) << (shift - 1))) >>> shift;
    else           r = v <<< (-shift);
    mx = (longint'(1) << (out_w - 1)) - 1;
    mn = -(longint'(1) << (out_w - 1));
    sat = 1'b0;
    if (r > mx) begin r = mx; sat = 1'b1; end
    if (r < mn) begin r = mn; sat = 1'b1; end
    return r;
  endfunction

  // Two's-complement wrap of v to w bits.
  function automatic longint wrap(longint v, int w);
    longint m;
    if (w >= 64) return v;
    m = v & ((longint'(1) << w) - 1);
    if (m >= (longint'(1) << (w - 1))) m = m - (longint'(1) << w);
    return m;
  endfunction

  // Impulse response of ((1 - z^-(R*M)) / (1 - z^-1))^N: N boxcars of length R*M.
  function automatic lq_t cic_kernel(int n, int r, int m);
    lq_t h, t;
    h.push_back(1);
    for (int s = 0; s < n; s++) begin
      t = {};
      for (int i = 0; i < h.size() + r * m - 1; i++) t.push_back(0);
      for (int i = 0; i < h.size(); i++)
        for (int j = 0; j < r * m; j++) t[i + j] += h[i];
      h = t;
    end
    return h;
  endfunction

  // Full-rate convolution sampled at n = (k+1)*r - 1 - delay, k = 0,1,...
  // (samples before the start of x count as zero).
  function automatic lq_t conv_decim(lq_t x, lq_t h, int r, int delay);
    lq_t y;
    for (int n = r - 1; n < x.size(); n += r) begin
      longint acc = 0;
      int at = n - delay;
      for (int k = 0; k < h.size(); k++)
        if (at - k >= 0) acc += h[k] * x[at - k];
      y.push_back(acc);
    end
    return y;
  endfunction

endpackage
