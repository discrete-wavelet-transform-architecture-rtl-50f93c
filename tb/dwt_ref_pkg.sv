// dwt_ref_pkg: reference model for the testbenches, written from the
// filter equations rather than from the RTL structure.
//
// - coefficient sets computed from the closed-form Daubechies-4 taps with
//   real arithmetic (round(2^23 * tap * k), k = 1/sqrt2 or sqrt2 by default;
//   other scales and shorter words round(2^(b-2) * tap * k) * 2^(25-b))
// - fpe4(): the four-tap MAC on integers, 32-bit wrap-around accumulation,
//   right shift by 23 and clamp to 8 bits
// - ana_model(): the three-level analysis equations, producing the expected
//   interleaved output stream (position c carries o(c-1), r(c-2), u(c-4) or
//   v(c-8) by c mod 8)
// - syn_model(): the synthesis equations applied to such a stream, giving
//   the expected output stream. For stage results x'(m) (m a multiple of
//   the stage step) the even-named one uses (g3, g1, h3, h1) and x'(m+step/2)
//   uses (g2, g0, h2, h0); position c carries i'(c-12).
// - ana2d() / syn2d(): whole-image row-then-column transforms on
//   offset-binary bytes, each line treated as an isolated signal, with the
//   sub-band layout v | u | r | o within every line.
// Everything before index 0 is zero.
package dwt_ref_pkg;

  localparam int OFF = 64;   // index offset so negative indices fit

  typedef int coef4_t [4];

  function automatic int q23(real v);
    real t;
    t = v * 8388608.0;
    return (t >= 0.0) ? int'($floor(t + 0.5)) : -int'($floor(-t + 0.5));
  endfunction

  // v rounded to a bits-wide coefficient (bits-2 fraction bits), placed in
  // the upper bits of the 25-bit word
  function automatic int qn(real v, int bits);
    real t;
    int r;
    t = v * (2.0 ** (bits - 2));
    r = (t >= 0.0) ? int'($floor(t + 0.5)) : -int'($floor(-t + 0.5));
    return r * (1 << (25 - bits));
  endfunction

  // taps h[k], g[k] scaled by k, rounded to bits-wide words
  function automatic coef4_t h_taps(real k, int bits = 25);
    real s3, s2;
    coef4_t c;
    s3 = $sqrt(3.0); s2 = $sqrt(2.0);
    c[0] = qn(k * (1.0 + s3) / (4.0 * s2), bits);
    c[1] = qn(k * (3.0 + s3) / (4.0 * s2), bits);
    c[2] = qn(k * (3.0 - s3) / (4.0 * s2), bits);
    c[3] = qn(k * (1.0 - s3) / (4.0 * s2), bits);
    return c;
  endfunction

  function automatic coef4_t g_taps(real k, int bits = 25);
    coef4_t h, g;
    h = h_taps(k, bits);
    g[0] = h[3]; g[1] = -h[2]; g[2] = h[1]; g[3] = -h[0];
    return g;
  endfunction

  // 25-bit two's complement pattern of a tap
  function automatic logic [24:0] pat25(int v);
    return v[24:0];
  endfunction

  function automatic int sat8(int acc, output bit clamped);
    bit fits;
    fits = (acc[31] == acc[30]);
    clamped = !fits;
    if (fits)           return int'($signed(acc[30:23]));
    else if (acc[31])   return -128;
    else                return 127;
  endfunction

  // Four-tap MAC: sum of c[k]*x[k] in 32-bit wrap-around arithmetic
  function automatic int fpe4(coef4_t c, int x0, int x1, int x2, int x3,
                              output bit flag);
    int acc, prod, nxt;
    int x [4];
    bit clamped, wrapped;
    x = '{x0, x1, x2, x3};
    acc = 0; wrapped = 0;
    for (int k = 0; k < 4; k++) begin
      prod = c[k] * x[k];
      nxt  = acc + prod;
      if ((acc[31] == prod[31]) && (nxt[31] != acc[31])) wrapped = 1;
      acc = nxt;
    end
    fpe4 = sat8(acc, clamped);
    flag = clamped | wrapped;
  endfunction

  function automatic int at(const ref int a [], input int n);
    return (n + OFF < 0 || n + OFF >= a.size()) ? 0 : a[n + OFF];
  endfunction

  // Expected analysis output stream for input samples x[0..N-1]
  // (ka: analysis scale, default 1/sqrt2; bits: coefficient word width)
  function automatic void ana_model(const ref int x [], output int y [],
                                    output int nclamp,
                                    input real ka = 0.7071067811865476,
                                    input int bits = 25);
    int n_, sz;
    int i_ [], o_ [], p_ [], r_ [], s_ [], u_ [], v_ [];
    coef4_t H, G;
    bit f;
    H = h_taps(ka, bits);
    G = g_taps(ka, bits);
    n_ = x.size();
    sz = n_ + 2 * OFF;
    i_ = new[sz]; o_ = new[sz]; p_ = new[sz]; r_ = new[sz];
    s_ = new[sz]; u_ = new[sz]; v_ = new[sz];
    foreach (i_[k]) begin
      i_[k] = 0; o_[k] = 0; p_[k] = 0; r_[k] = 0; s_[k] = 0; u_[k] = 0; v_[k] = 0;
    end
    for (int k = 0; k < n_; k++) i_[k + OFF] = x[k];
    nclamp = 0;
    for (int n = 0; n < n_; n += 2) begin
      o_[n+OFF] = fpe4(G, at(i_,n), at(i_,n-1), at(i_,n-2), at(i_,n-3), f); nclamp += f;
      p_[n+OFF] = fpe4(H, at(i_,n), at(i_,n-1), at(i_,n-2), at(i_,n-3), f); nclamp += f;
    end
    for (int n = 0; n < n_; n += 4) begin
      r_[n+OFF] = fpe4(G, at(p_,n), at(p_,n-2), at(p_,n-4), at(p_,n-6), f); nclamp += f;
      s_[n+OFF] = fpe4(H, at(p_,n), at(p_,n-2), at(p_,n-4), at(p_,n-6), f); nclamp += f;
    end
    for (int n = 0; n < n_; n += 8) begin
      u_[n+OFF] = fpe4(G, at(s_,n), at(s_,n-4), at(s_,n-8), at(s_,n-12), f); nclamp += f;
      v_[n+OFF] = fpe4(H, at(s_,n), at(s_,n-4), at(s_,n-8), at(s_,n-12), f); nclamp += f;
    end
    y = new[n_];
    for (int c = 0; c < n_; c++) begin
      case (c % 8)
        1, 3, 5, 7: y[c] = at(o_, c - 1);
        2, 6:       y[c] = at(r_, c - 2);
        4:          y[c] = at(u_, c - 4);
        default:    y[c] = at(v_, c - 8);
      endcase
    end
  endfunction

  // Expected synthesis output stream for an analysis-ordered input stream
  // (ks: synthesis scale, default sqrt2; bits: coefficient word width)
  function automatic void syn_model(const ref int x [], output int y [],
                                    output int nclamp,
                                    input real ks = 1.4142135623730951,
                                    input int bits = 25);
    int n_, sz;
    int o_ [], r_ [], u_ [], v_ [], s_ [], p_ [], i_ [];
    coef4_t H, G, EV, OD;
    bit f;
    H = h_taps(ks, bits);
    G = g_taps(ks, bits);
    EV = '{G[3], G[1], H[3], H[1]};
    OD = '{G[2], G[0], H[2], H[0]};
    n_ = x.size();
    sz = n_ + 2 * OFF;
    o_ = new[sz]; r_ = new[sz]; u_ = new[sz]; v_ = new[sz];
    s_ = new[sz]; p_ = new[sz]; i_ = new[sz];
    foreach (o_[k]) begin
      o_[k] = 0; r_[k] = 0; u_[k] = 0; v_[k] = 0; s_[k] = 0; p_[k] = 0; i_[k] = 0;
    end
    for (int c = 0; c < n_; c++) begin
      case (c % 8)
        1, 3, 5, 7: o_[c - 1 + OFF] = x[c];
        2, 6:       r_[c - 2 + OFF] = x[c];
        4:          u_[c - 4 + OFF] = x[c];
        default:    v_[c - 8 + OFF] = x[c];
      endcase
    end
    nclamp = 0;
    for (int m = -16; m < n_; m += 8) begin
      s_[m+OFF]   = fpe4(EV, at(u_,m), at(u_,m-8), at(v_,m), at(v_,m-8), f); nclamp += f;
      s_[m+4+OFF] = fpe4(OD, at(u_,m), at(u_,m-8), at(v_,m), at(v_,m-8), f); nclamp += f;
    end
    for (int m = -16; m < n_; m += 4) begin
      p_[m+OFF]   = fpe4(EV, at(r_,m), at(r_,m-4), at(s_,m), at(s_,m-4), f); nclamp += f;
      p_[m+2+OFF] = fpe4(OD, at(r_,m), at(r_,m-4), at(s_,m), at(s_,m-4), f); nclamp += f;
    end
    for (int m = -16; m < n_; m += 2) begin
      i_[m+OFF]   = fpe4(EV, at(o_,m), at(o_,m-2), at(p_,m), at(p_,m-2), f); nclamp += f;
      i_[m+1+OFF] = fpe4(OD, at(o_,m), at(o_,m-2), at(p_,m), at(p_,m-2), f); nclamp += f;
    end
    y = new[n_];
    for (int c = 0; c < n_; c++) y[c] = at(i_, c - 12);
  endfunction

  // Line position of the coefficient carried by stream period c (1..n)
  function automatic int band_pos(int c, int n);
    if (c % 2 == 1)      return n / 2 + c / 2;
    else if (c % 4 == 2) return n / 4 + c / 4;
    else if (c % 8 == 4) return n / 8 + c / 8;
    else                 return c / 8 - 1;
  endfunction

  // One line: analysis (inv = 0) or synthesis (inv = 1, output delay dly)
  function automatic void line1d(ref int ln [], input bit inv, input int dly,
                                 inout int nclamp);
    int n, nc;
    int x [], y [];
    n = ln.size();
    if (!inv) begin
      x = new[n + 1];
      for (int k = 0; k <= n; k++) x[k] = (k < n) ? ln[k] - 128 : 0;
      ana_model(x, y, nc);
      for (int c = 1; c <= n; c++) ln[band_pos(c, n)] = y[c] + 128;
    end else begin
      x = new[n + dly];
      for (int c = 0; c < n + dly; c++)
        x[c] = (c >= 1 && c <= n) ? ln[band_pos(c, n)] - 128 : 0;
      syn_model(x, y, nc);
      for (int k = 0; k < n; k++) ln[k] = y[k + dly] + 128;
    end
    nclamp += nc;
  endfunction

  // Whole image, row-major bytes, rows first then columns, in place
  function automatic void img2d(ref int img [], input int cols, input int rows,
                                input bit inv, input int dly, output int nclamp);
    int ln [];
    nclamp = 0;
    ln = new[cols];
    for (int r = 0; r < rows; r++) begin
      for (int k = 0; k < cols; k++) ln[k] = img[r * cols + k];
      line1d(ln, inv, dly, nclamp);
      for (int k = 0; k < cols; k++) img[r * cols + k] = ln[k];
    end
    ln = new[rows];
    for (int q = 0; q < cols; q++) begin
      for (int k = 0; k < rows; k++) ln[k] = img[k * cols + q];
      line1d(ln, inv, dly, nclamp);
      for (int k = 0; k < rows; k++) img[k * cols + q] = ln[k];
    end
  endfunction

endpackage
