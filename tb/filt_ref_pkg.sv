// filt_ref_pkg: bit-exact reference model of the filter bank for the
// testbenches. It computes the analysis and synthesis filters directly from
// their convolution sums (no polyphase structure, no pipelining), with the
// same fixed-point rules as the hardware: each tap is the sample shifted
// right arithmetically by the coefficient's exponent, taps are summed
// exactly, analysis results are halved with an arithmetic shift, and the
// result is wrapped to DATA_W bits. Samples before the first one are zero.
package filt_ref_pkg;
  import filt_pkg::*;

  typedef int arr_t[];

  function automatic int wrapw(input longint v, input int w);
    longint m;
    m = (longint'(1) << w);
    v = v & (m - 1);
    if (v >= (m >> 1)) v = v - m;
    return int'(v);
  endfunction

  function automatic int tapv(input int x, input coef_t c);
    int t;
    if (!c.nz) return 0;
    t = x >>> c.shift;
    return c.neg ? -t : t;
  endfunction

  // 1-D analysis: lp[m] = 1/2 sum_k h[k] x[2m-k], hp with g[k] = (-1)^(k+1) h[k].
  function automatic void ana1d(input arr_t x, input coef_t c[ANA_TAPS],
                                output arr_t lp, output arr_t hp);
    int n;
    n = x.size();
    lp = new[n / 2];
    hp = new[n / 2];
    for (int m = 0; m < n / 2; m++) begin
      longint sl, sh;
      sl = 0; sh = 0;
      for (int k = 0; k < ANA_TAPS; k++) begin
        int t;
        if (2 * m - k < 0) continue;
        t = tapv(x[2 * m - k], c[k]);
        sl += t;
        sh += (k % 2 == 1) ? t : -t;
      end
      lp[m] = wrapw(sl >>> 1, DATA_W);
      hp[m] = wrapw(sh >>> 1, DATA_W);
    end
  endfunction

  // 1-D synthesis: s = lp + hp, d = lp - hp,
  // y0[m] = sum_j f[2j] s[m-j], y1[m] = sum_j f[2j+1] d[m-j].
  function automatic void syn1d(input arr_t lp, input arr_t hp, input coef_t c[SYN_TAPS],
                                output arr_t y0, output arr_t y1);
    int n;
    n = lp.size();
    y0 = new[n];
    y1 = new[n];
    for (int m = 0; m < n; m++) begin
      longint a, b;
      a = 0; b = 0;
      for (int j = 0; j < SYN_TAPS / 2; j++) begin
        if (m - j < 0) continue;
        a += tapv(lp[m - j] + hp[m - j], c[2 * j]);
        b += tapv(lp[m - j] - hp[m - j], c[2 * j + 1]);
      end
      y0[m] = wrapw(a, DATA_W);
      y1[m] = wrapw(b, DATA_W);
    end
  endfunction

  // Images are flat arrays in raster order, img[r*w + c].
  function automatic arr_t get_col(input arr_t img, input int w, input int h, input int c);
    arr_t r;
    r = new[h];
    for (int i = 0; i < h; i++) r[i] = img[i * w + c];
    return r;
  endfunction

  function automatic arr_t get_row(input arr_t img, input int w, input int r);
    arr_t o;
    o = new[w];
    for (int i = 0; i < w; i++) o[i] = img[r * w + i];
    return o;
  endfunction

  // 2-D analysis step: X filter on rows, then Y filter on columns.
  function automatic void ana2d(input arr_t img, input int w, input int h, input coef_t c[ANA_TAPS],
                                output arr_t ll, output arr_t lh, output arr_t hl, output arr_t hh);
    arr_t lo, hi, a, b;
    int w2, h2;
    w2 = w / 2; h2 = h / 2;
    lo = new[h * w2]; hi = new[h * w2];
    for (int r = 0; r < h; r++) begin
      ana1d(get_row(img, w, r), c, a, b);
      for (int i = 0; i < w2; i++) begin lo[r * w2 + i] = a[i]; hi[r * w2 + i] = b[i]; end
    end
    ll = new[h2 * w2]; lh = new[h2 * w2]; hl = new[h2 * w2]; hh = new[h2 * w2];
    for (int i = 0; i < w2; i++) begin
      ana1d(get_col(lo, w2, h, i), c, a, b);
      for (int r = 0; r < h2; r++) begin ll[r * w2 + i] = a[r]; lh[r * w2 + i] = b[r]; end
      ana1d(get_col(hi, w2, h, i), c, a, b);
      for (int r = 0; r < h2; r++) begin hl[r * w2 + i] = a[r]; hh[r * w2 + i] = b[r]; end
    end
  endfunction

  // 2-D synthesis step on bw x bh bands: returns the four block planes
  // p00, p01, p10, p11 (each bw x bh), px[r][c] of the block from band (m,n).
  function automatic void syn2d(input arr_t ll, input arr_t lh, input arr_t hl, input arr_t hh,
                                input int bw, input int bh, input coef_t c[SYN_TAPS],
                                output arr_t p00, output arr_t p01,
                                output arr_t p10, output arr_t p11);
    arr_t l0, l1, h0, h1, a, b;
    l0 = new[bw * bh]; l1 = new[bw * bh]; h0 = new[bw * bh]; h1 = new[bw * bh];
    for (int i = 0; i < bw; i++) begin
      syn1d(get_col(ll, bw, bh, i), get_col(lh, bw, bh, i), c, a, b);
      for (int r = 0; r < bh; r++) begin l0[r * bw + i] = a[r]; l1[r * bw + i] = b[r]; end
      syn1d(get_col(hl, bw, bh, i), get_col(hh, bw, bh, i), c, a, b);
      for (int r = 0; r < bh; r++) begin h0[r * bw + i] = a[r]; h1[r * bw + i] = b[r]; end
    end
    p00 = new[bw * bh]; p01 = new[bw * bh]; p10 = new[bw * bh]; p11 = new[bw * bh];
    for (int r = 0; r < bh; r++) begin
      syn1d(get_row(l0, bw, r), get_row(h0, bw, r), c, a, b);
      for (int i = 0; i < bw; i++) begin p00[r * bw + i] = a[i]; p01[r * bw + i] = b[i]; end
      syn1d(get_row(l1, bw, r), get_row(h1, bw, r), c, a, b);
      for (int i = 0; i < bw; i++) begin p10[r * bw + i] = a[i]; p11[r * bw + i] = b[i]; end
    end
  endfunction

  function automatic void default_coefs(output coef_t a[ANA_TAPS], output coef_t s[SYN_TAPS]);
    for (int k = 0; k < ANA_TAPS; k++) a[k] = ana_default(k);
    for (int k = 0; k < SYN_TAPS; k++) s[k] = syn_default(k);
  endfunction
endpackage
