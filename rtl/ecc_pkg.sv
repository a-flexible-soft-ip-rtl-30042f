// Field and curve constants shared by the GF(2^m) operators and the
// elliptic-curve units.
//
// The core works in binary fields GF(2^m) with a polynomial basis and on
// the five NIST Koblitz curves  y^2 + xy = x^3 + a*x^2 + 1  (K-163, K-233,
// K-283, K-409, K-571). Every module takes the field size M as a parameter
// and derives from it, through the functions below, the reduction
// polynomial f(x), the curve coefficient a and the cycle counts that decide
// which inversion architecture is used. The polynomials and coefficients
// are the NIST values; the field size is the only thing a user sets to pick
// a curve. A size that is not one of the five falls back to K-163's
// polynomial shape, so any other field needs an entry added here.
package ecc_pkg;

  // Largest field size the functions below describe.
  localparam int unsigned MAX_M = 571;

  // Number of non-leading terms (including the constant 1) of f(x).
  function automatic int unsigned poly_terms(int unsigned m);
    case (m)
      233, 409: return 2;   // trinomials
      default:  return 4;   // pentanomials
    endcase
  endfunction

  // Exponent of the j-th non-leading term of f(x); term 0 is always x^0.
  function automatic int unsigned poly_tap(int unsigned m, int unsigned j);
    int unsigned t [4];
    case (m)
      233:     t = '{0, 74, 0, 0};
      283:     t = '{0, 5, 7, 12};
      409:     t = '{0, 87, 0, 0};
      571:     t = '{0, 2, 5, 10};
      default: t = '{0, 3, 6, 7};    // 163
    endcase
    return t[j];
  endfunction

  // Highest non-leading exponent of f(x).
  function automatic int unsigned poly_top_tap(int unsigned m);
    int unsigned top;
    top = 0;
    for (int unsigned j = 0; j < poly_terms(m); j++)
      if (poly_tap(m, j) > top) top = poly_tap(m, j);
    return top;
  endfunction

  // f(x) without its leading term x^m, as an MAX_M-bit vector.
  function automatic logic [MAX_M-1:0] poly_low(int unsigned m);
    logic [MAX_M-1:0] f;
    f = '0;
    for (int unsigned j = 0; j < poly_terms(m); j++) f[poly_tap(m, j)] = 1'b1;
    return f;
  endfunction

  // Curve coefficient a: 1 for K-163, 0 for the other four Koblitz curves.
  function automatic logic curve_a(int unsigned m);
    return (m == 163) ? 1'b1 : 1'b0;
  endfunction

  // Passes of the word-level fold  r = low(r) + high(r)*(f - x^m)  needed to
  // bring a product of degree 2m-2 below degree m.
  function automatic int unsigned fold_passes(int unsigned m);
    int unsigned d, n;
    d = 2 * m - 2;
    n = 0;
    while (d >= m) begin
      d = d - m + poly_top_tap(m);
      n++;
    end
    return n;
  endfunction

  // Clock cycles of one multiplication with W bits processed per cycle.
  function automatic int unsigned mult_cycles(int unsigned m, int unsigned w);
    return (m + w - 1) / w;
  endfunction

  // floor(log2(v)) for v >= 1.
  function automatic int unsigned flog2(int unsigned v);
    int unsigned r;
    r = 0;
    while (v > 1) begin
      v = v >> 1;
      r++;
    end
    return r;
  endfunction

  // Multiplications of the Itoh-Tsujii addition chain for exponent m-1:
  // floor(log2(m-1)) + popcount(m-1) - 1 (9 for K-163).
  function automatic int unsigned itoh_tsujii_mults(int unsigned m);
    int unsigned e, ones;
    e = m - 1;
    ones = 0;
    for (int unsigned i = 0; i < 32; i++) ones += (e >> i) & 1;
    return flog2(e) + ones - 1;
  endfunction

  // Inversion architecture choice: Itoh-Tsujii when its m-1 squarings plus
  // chain multiplications take no more than the binary algorithm's 2m cycles.
  function automatic logic use_itoh_tsujii(int unsigned m, int unsigned w);
    return ((m - 1) + itoh_tsujii_mults(m) * mult_cycles(m, w)) <= 2 * m;
  endfunction

endpackage
