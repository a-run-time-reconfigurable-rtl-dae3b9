// gf_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL. Field elements are up to 255 bits; the field size m and the
// field polynomial f (bit m set) are run-time arguments, so one package serves
// every field size. Multiplication is a full polynomial product followed by
// reduction, inversion uses Fermat's little theorem (a^(2^m-2)), and scalar
// multiplication is double-and-add from the most significant bit: all three
// differ from the algorithms in the hardware.
package gf_ref_pkg;

  typedef logic [255:0] fe_t;

  typedef struct packed {
    logic inf;
    fe_t  x;
    fe_t  y;
  } pt_t;

  function automatic fe_t gf_mul(fe_t a, fe_t b, int m, fe_t f);
    logic [511:0] p;
    p = '0;
    for (int i = 0; i < m; i++) if (b[i]) p = p ^ (512'(a) << i);
    for (int i = 2*m-2; i >= m; i--) if (p[i]) p = p ^ (512'(f) << (i - m));
    return p[255:0];
  endfunction

  function automatic fe_t gf_inv(fe_t a, int m, fe_t f);
    fe_t r, t;
    r = 256'd1;
    t = a;
    for (int i = 1; i < m; i++) begin
      t = gf_mul(t, t, m, f);
      r = gf_mul(r, t, m, f);
    end
    return r;
  endfunction

  function automatic fe_t rand_fe(int m);
    fe_t v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v & ((256'd1 << m) - 1);
  endfunction

  function automatic pt_t pt_inf();
    pt_t r;
    r.inf = 1'b1; r.x = '0; r.y = '0;
    return r;
  endfunction

  function automatic pt_t pt_dbl(pt_t p, fe_t a, int m, fe_t f);
    pt_t r;
    fe_t lam;
    if (p.inf || p.x == '0) return pt_inf();
    lam = p.x ^ gf_mul(p.y, gf_inv(p.x, m, f), m, f);
    r.inf = 1'b0;
    r.x = gf_mul(lam, lam, m, f) ^ lam ^ a;
    r.y = gf_mul(p.x, p.x, m, f) ^ gf_mul(lam, r.x, m, f) ^ r.x;
    return r;
  endfunction

  function automatic pt_t pt_add(pt_t p, pt_t q, fe_t a, int m, fe_t f);
    pt_t r;
    fe_t lam;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return pt_dbl(p, a, m, f);
      return pt_inf();
    end
    lam = gf_mul(p.y ^ q.y, gf_inv(p.x ^ q.x, m, f), m, f);
    r.inf = 1'b0;
    r.x = gf_mul(lam, lam, m, f) ^ lam ^ p.x ^ q.x ^ a;
    r.y = gf_mul(lam, p.x ^ r.x, m, f) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t pt_mul(fe_t k, pt_t p, fe_t a, int m, fe_t f);
    pt_t r;
    r = pt_inf();
    for (int i = m - 1; i >= 0; i--) begin
      r = pt_dbl(r, a, m, f);
      if (k[i]) r = pt_add(r, p, a, m, f);
    end
    return r;
  endfunction

  // b such that (x, y) lies on y^2 + xy = x^3 + a x^2 + b
  function automatic fe_t curve_b(fe_t x, fe_t y, fe_t a, int m, fe_t f);
    fe_t x2;
    x2 = gf_mul(x, x, m, f);
    return gf_mul(y, y, m, f) ^ gf_mul(x, y, m, f) ^ gf_mul(x2, x, m, f) ^ gf_mul(a, x2, m, f);
  endfunction

  function automatic bit on_curve(pt_t p, fe_t a, fe_t b, int m, fe_t f);
    if (p.inf) return 1'b1;
    return curve_b(p.x, p.y, a, m, f) == b;
  endfunction

  function automatic int popcount(fe_t v);
    int n;
    n = 0;
    for (int i = 0; i < 256; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
