// tate_ref_pkg: reference arithmetic for the testbenches.
//
// Plain behavioural models of F_2^163 (bit-serial multiplication modulo
// z^163 + z^7 + z^6 + z^3 + 1), of F_2^652 as the tower
// F_2^m[u]/(u^2+u+1)[w]/(w^2+(u+1)w+1) with schoolbook products, and of the
// reduced Tate pairing computed straight from Miller's algorithm: the line
// value is evaluated at the distorted point (xQ + s^2, yQ + s xQ + t) with
// s = u + 1 and t = u w as full F_2^652 elements, inverses are computed as
// a^(2^m - 2) by square-and-multiply and the final power (2^652 - 1)/l is taken
// by square-and-multiply with the exponent found by long division. None of the
// shortcuts used by the hardware program appear here.
package tate_ref_pkg;
  localparam int M = 163;
  typedef logic [M-1:0] fe_t;
  typedef struct packed { fe_t c3, c2, c1, c0; } f4_t;   // (c0 + c1 u) + (c2 + c3 u) w
  localparam fe_t RED = fe_t'((1 << 7) | (1 << 6) | (1 << 3) | 1);
  localparam logic [M:0] L_ORDER = (165'd1 << 163) + (165'd1 << 82) + 165'd1;

  function automatic fe_t gf_mul(fe_t a, fe_t b);
    fe_t r = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = {r[M-2:0], 1'b0} ^ (r[M-1] ? RED : '0);
      if (a[i]) r ^= b;
    end
    return r;
  endfunction

  function automatic fe_t gf_pow2k(fe_t a, int k);   // a^(2^k)
    for (int i = 0; i < k; i++) a = gf_mul(a, a);
    return a;
  endfunction

  function automatic fe_t gf_inv(fe_t a);             // a^(2^m - 2)
    fe_t r = fe_t'(1);
    fe_t s = a;
    for (int i = 1; i < M; i++) begin                 // exponent bits 1..m-1 set
      s = gf_mul(s, s);
      r = gf_mul(r, s);
    end
    return r;
  endfunction

  function automatic logic gf_trace(fe_t a);
    fe_t s = a, t = a;
    for (int i = 1; i < M; i++) begin s = gf_mul(s, s); t ^= s; end
    return t[0];
  endfunction

  function automatic fe_t gf_halftrace(fe_t c);
    fe_t h = c, s = c;
    for (int i = 1; i <= (M - 1) / 2; i++) begin s = gf_pow2k(s, 2); h ^= s; end
    return h;
  endfunction

  // F_2^2m: (a0 + a1 u)(b0 + b1 u), u^2 = u + 1
  function automatic logic [2*M-1:0] f2_mul(fe_t a0, fe_t a1, fe_t b0, fe_t b1);
    fe_t p00 = gf_mul(a0, b0), p01 = gf_mul(a0, b1), p10 = gf_mul(a1, b0), p11 = gf_mul(a1, b1);
    return {p01 ^ p10 ^ p11, p00 ^ p11};              // {u coeff, const}
  endfunction

  function automatic f4_t f4_mul(f4_t x, f4_t y);
    logic [2*M-1:0] ac, ad, bc, bd;
    fe_t e0, e1, g0, g1;
    f4_t r;
    ac = f2_mul(x.c0, x.c1, y.c0, y.c1);
    ad = f2_mul(x.c0, x.c1, y.c2, y.c3);
    bc = f2_mul(x.c2, x.c3, y.c0, y.c1);
    bd = f2_mul(x.c2, x.c3, y.c2, y.c3);
    // w^2 = (u + 1) w + 1: bd w^2 = bd (u + 1) w + bd
    {e1, e0} = f2_mul(bd[M-1:0], bd[2*M-1:M], fe_t'(1), fe_t'(1));   // bd (u + 1)
    g0 = ac[M-1:0] ^ bd[M-1:0];
    g1 = ac[2*M-1:M] ^ bd[2*M-1:M];
    r.c0 = g0;
    r.c1 = g1;
    r.c2 = ad[M-1:0] ^ bc[M-1:0] ^ e0;
    r.c3 = ad[2*M-1:M] ^ bc[2*M-1:M] ^ e1;
    return r;
  endfunction

  function automatic f4_t f4_const(fe_t a);
    f4_t r = '0;
    r.c0 = a;
    return r;
  endfunction

  function automatic f4_t f4_one();
    return f4_const(fe_t'(1));
  endfunction

  function automatic f4_t f4_pow(f4_t x, logic [655:0] e);
    f4_t r = f4_one();
    for (int i = 655; i >= 0; i--) begin
      r = f4_mul(r, r);
      if (e[i]) r = f4_mul(r, x);
    end
    return r;
  endfunction

  // line through V with slope lam, evaluated at phi(Q)
  function automatic f4_t line_val(fe_t lam, fe_t xa, fe_t ya, fe_t xq, fe_t yq);
    f4_t s, t, s2, xphi, yphi, r;
    s = '0; s.c0 = fe_t'(1); s.c1 = fe_t'(1);          // s = u + 1
    t = '0; t.c3 = fe_t'(1);                            // t = u w
    s2   = f4_mul(s, s);
    xphi = f4_const(xq) ^ s2;
    yphi = f4_const(yq) ^ f4_mul(f4_const(xq), s) ^ t;
    r = f4_mul(f4_const(lam), xphi ^ f4_const(xa)) ^ yphi ^ f4_const(ya);
    return r;
  endfunction

  function automatic f4_t tate(fe_t xp, fe_t yp, fe_t xq, fe_t yq);
    f4_t f = f4_one();
    fe_t xv = xp, yv = yp, lam, x2, y2;
    logic [655:0] full, mexp;
    for (int i = 162; i >= 0; i--) begin
      lam = gf_mul(xv, xv) ^ fe_t'(1);
      f = f4_mul(f4_mul(f, f), line_val(lam, xv, yv, xq, yq));
      x2 = gf_mul(lam, lam);
      y2 = gf_mul(lam, x2 ^ xv) ^ yv ^ fe_t'(1);
      xv = x2; yv = y2;
      if (L_ORDER[i] && i != 0) begin
        lam = gf_mul(yv ^ yp, gf_inv(xv ^ xp));
        f = f4_mul(f, line_val(lam, xp, yp, xq, yq));
        x2 = gf_mul(lam, lam) ^ xv ^ xp;
        y2 = gf_mul(lam, x2 ^ xp) ^ yp ^ fe_t'(1);
        xv = x2; yv = y2;
      end
    end
    full = '0;
    full[651:0] = '1;
    mexp = full / 656'(L_ORDER);
    return f4_pow(f, mexp);
  endfunction

  // a point with the given x if one exists (y^2 + y = x^3 + x + 1)
  function automatic logic point_from_x(fe_t x, output fe_t y);
    fe_t c = gf_mul(gf_mul(x, x), x) ^ x ^ fe_t'(1);
    y = gf_halftrace(c);
    return gf_trace(c) == 1'b0 && (gf_mul(y, y) ^ y) == c;
  endfunction

  function automatic void point_double(fe_t x, fe_t y, output fe_t x2, output fe_t y2);
    fe_t lam = gf_mul(x, x) ^ fe_t'(1);
    x2 = gf_mul(lam, lam);
    y2 = gf_mul(lam, x2 ^ x) ^ y ^ fe_t'(1);
  endfunction
endpackage
