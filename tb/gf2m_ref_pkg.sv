// Reference models for the GF(2^m) testbenches (word level, m <= 16).
//
// gf_mul       : shift-and-add product reduced by G (independent of Euclid).
// is_irred     : brute-force irreducibility test of a degree-m polynomial.
// ref_iter     : one iteration of the fixed-length Euclid variant, as a
//                word-level reference for a single basic cell.
// ref_div      : all 2m-2 iterations; also counts how often the swap
//                (Ctrl1), the R+S step (Ctrl2), the U/V update (Ctrl3) and the
//                reduction by G of T happened.
package gf2m_ref_pkg;

  typedef struct {
    int unsigned r, s, t, u, v;   // s without its x^m term
    int          count;
    bit          state;
  } row_t;

  typedef struct {
    int unsigned n_ctrl1, n_ctrl2, n_ctrl3, n_red, n_maxcount;
  } ev_t;

  function automatic int unsigned gf_mul(int unsigned a, int unsigned b,
                                         int unsigned g, int m);
    int unsigned p = 0;
    int unsigned x = a;
    for (int i = 0; i < m; i++) begin
      if (b[i]) p ^= x;
      x = x << 1;
      if (x[m]) x ^= g;
    end
    return p;
  endfunction

  function automatic bit is_irred(int unsigned g, int m);
    for (int unsigned d = 2; d < (1 << (m / 2 + 1)); d++) begin
      int unsigned rem = g;
      int dd = $clog2(d + 1) - 1;
      for (int i = m; i >= dd; i--)
        if (rem[i]) rem ^= d << (i - dd);
      if (rem == 0) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic int unsigned rand_irred(int m);
    int unsigned g;
    do g = (1 << m) | ($urandom & ((1 << m) - 1)) | 1; while (!is_irred(g, m));
    return g;
  endfunction

  function automatic row_t ref_iter(row_t x, int unsigned g, int m, bit inv,
                                    ref ev_t ev);
    row_t y = x;
    int unsigned rr, tt, ss;
    int unsigned mask = (1 << m) - 1;
    bit rm;
    rr = x.r << 1;
    tt = x.t << 1;
    ss = x.s | (1 << m);
    if (tt[m] && !inv) begin
      tt ^= g;
      ev.n_red++;
    end
    tt &= mask;
    rm = rr[m];
    if (rm) ev.n_ctrl2++;
    if (!x.state) begin
      y.count = x.count + 1;
      if (rm) begin
        y.s = rr & mask;
        rr  = rr ^ ss;
        tt  = x.u;
        y.state = 1'b1;
        ev.n_ctrl1++;
      end
    end else begin
      y.count = x.count - 1;
      if (rm) begin
        rr = rr ^ ss;
        tt = tt ^ x.u;
      end
      if (y.count == 0) begin
        y.u = tt ^ x.v;
        y.v = x.u;
        y.state = 1'b0;
        ev.n_ctrl3++;
      end
    end
    if (y.count == m) ev.n_maxcount++;
    y.r = rr & mask;
    y.t = tt;
    return y;
  endfunction

  function automatic int unsigned ref_div(int unsigned a, int unsigned b,
                                          int unsigned g, int m, bit inv,
                                          ref ev_t ev);
    row_t x;
    x.r = b; x.s = g & ((1 << m) - 1); x.t = 0; x.u = inv ? 1 : a; x.v = 0;
    x.count = 0; x.state = 1'b0;
    for (int i = 0; i < 2 * m - 2; i++) x = ref_iter(x, g, m, inv, ev);
    return x.u;
  endfunction

endpackage
