// Reference model for the testbenches: GF(2^m) arithmetic and Koblitz-curve
// point operations written in the plainest way, independent of the RTL.
// Multiplication is a schoolbook product followed by bit-by-bit reduction
// with the whole field polynomial; inversion is the polynomial extended
// Euclidean algorithm. Curve points for stimuli are made by picking x and
// solving z^2 + z = x + a + 1/x^2 with the half-trace (m odd), y = x*z.
// All field elements are carried in 571-bit vectors; bits at and above m
// are zero.
package gf_ref_pkg;

  typedef logic [570:0]  fe_t;
  typedef logic [1141:0] fe2_t;
  typedef struct packed {
    logic inf;
    fe_t  x;
    fe_t  y;
  } pt_t;

  // Full field polynomial f(x), including x^m. Written out again here from
  // the NIST definitions so the model does not depend on the RTL package.
  function automatic fe2_t fpoly(int m);
    fe2_t f;
    f = '0;
    f[m] = 1'b1;
    f[0] = 1'b1;
    case (m)
      163: begin f[7] = 1; f[6] = 1; f[3] = 1; end
      233: f[74] = 1;
      283: begin f[12] = 1; f[7] = 1; f[5] = 1; end
      409: f[87] = 1;
      571: begin f[10] = 1; f[5] = 1; f[2] = 1; end
      default: $fatal(1, "gf_ref_pkg: unsupported field size %0d", m);
    endcase
    return f;
  endfunction

  function automatic fe_t curve_a(int m);
    return (m == 163) ? fe_t'(1) : fe_t'(0);
  endfunction

  function automatic fe_t rand_fe(int m);
    fe_t r;
    for (int i = 0; i < 571; i += 32) r[i +: 32] = $urandom;
    for (int i = m; i < 571; i++) r[i] = 1'b0;
    return r;
  endfunction

  function automatic fe_t mul(fe_t a, fe_t b, int m);
    fe2_t p, f;
    p = '0;
    for (int i = 0; i < m; i++) if (b[i]) p = p ^ (fe2_t'(a) << i);
    f = fpoly(m);
    for (int i = 2 * m - 2; i >= m; i--) if (p[i]) p = p ^ (f << (i - m));
    return p[570:0];
  endfunction

  function automatic fe_t sqr(fe_t a, int m);
    return mul(a, a, m);
  endfunction

  function automatic int degree(fe2_t p);
    for (int i = 1141; i >= 0; i--) if (p[i]) return i;
    return -1;
  endfunction

  // Inverse by the extended Euclidean algorithm (a != 0).
  function automatic fe_t inv(fe_t a, int m);
    fe2_t u, v, g1, g2, t;
    int   j;
    u  = fe2_t'(a);
    v  = fpoly(m);
    g1 = fe2_t'(1);
    g2 = '0;
    while (degree(u) > 0) begin
      j = degree(u) - degree(v);
      if (j < 0) begin
        t = u;  u = v;  v = t;
        t = g1; g1 = g2; g2 = t;
        j = -j;
      end
      u  = u ^ (v << j);
      g1 = g1 ^ (g2 << j);
    end
    // g1 can exceed degree m-1: reduce it.
    t = fpoly(m);
    for (int i = 1141; i >= m; i--) if (g1[i]) g1 = g1 ^ (t << (i - m));
    return g1[570:0];
  endfunction

  function automatic fe_t div(fe_t g, fe_t h, int m);
    return mul(g, inv(h, m), m);
  endfunction

  function automatic bit on_curve(pt_t p, int m);
    fe_t lhs, rhs, x2;
    if (p.inf) return 1'b1;
    x2  = sqr(p.x, m);
    lhs = sqr(p.y, m) ^ mul(p.x, p.y, m);
    rhs = mul(x2, p.x, m) ^ mul(curve_a(m), x2, m) ^ fe_t'(1);
    return lhs == rhs;
  endfunction

  function automatic pt_t infinity();
    pt_t o;
    o = '0;
    o.inf = 1'b1;
    return o;
  endfunction

  function automatic pt_t neg(pt_t p);
    pt_t r;
    r = p;
    r.y = p.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t add(pt_t p, pt_t q, int m);
    pt_t  r;
    fe_t  l;
    if (p.inf) return q;
    if (q.inf) return p;
    r = '0;
    if (p.x == q.x) begin
      if (p.y != q.y || p.x == '0) return infinity();
      l   = p.x ^ div(p.y, p.x, m);
      r.x = sqr(l, m) ^ l ^ curve_a(m);
      r.y = sqr(p.x, m) ^ mul(l ^ fe_t'(1), r.x, m);
    end else begin
      l   = div(p.y ^ q.y, p.x ^ q.x, m);
      r.x = sqr(l, m) ^ l ^ p.x ^ q.x ^ curve_a(m);
      r.y = mul(l, p.x ^ r.x, m) ^ r.x ^ p.y;
    end
    return r;
  endfunction

  // Frobenius map tau(x, y) = (x^2, y^2).
  function automatic pt_t frob(pt_t p, int m);
    pt_t r;
    r = p;
    if (!p.inf) begin
      r.x = sqr(p.x, m);
      r.y = sqr(p.y, m);
    end
    return r;
  endfunction

  // sum over i of k_i * tau^i (P), digits k_i in {0, 1}.
  function automatic pt_t tau_mult(fe_t k, pt_t p, int m);
    pt_t q;
    q = infinity();
    for (int i = m - 1; i >= 0; i--) begin
      q = frob(q, m);
      if (k[i]) q = add(q, p, m);
    end
    return q;
  endfunction

  // Ordinary integer double-and-add, k given as a binary number.
  function automatic pt_t int_mult(fe_t k, pt_t p, int m);
    pt_t q;
    q = infinity();
    for (int i = 570; i >= 0; i--) begin
      q = add(q, q, m);
      if (k[i]) q = add(q, p, m);
    end
    return q;
  endfunction

  function automatic fe_t trace(fe_t c, int m);
    fe_t t, s;
    t = '0;
    s = c;
    for (int i = 0; i < m; i++) begin
      t = t ^ s;
      s = sqr(s, m);
    end
    return t;
  endfunction

  // A random affine point of the curve.
  function automatic pt_t rand_point(int m);
    pt_t p;
    fe_t x, c, z, s;
    forever begin
      x = rand_fe(m);
      if (x == '0) continue;
      c = x ^ curve_a(m) ^ inv(sqr(x, m), m);
      if (trace(c, m) != '0) continue;
      z = '0;
      s = c;
      for (int i = 0; i <= (m - 1) / 2; i++) begin
        z = z ^ s;
        s = sqr(sqr(s, m), m);
      end
      p.inf = 1'b0;
      p.x   = x;
      p.y   = mul(x, z, m);
      return p;
    end
  endfunction

endpackage
