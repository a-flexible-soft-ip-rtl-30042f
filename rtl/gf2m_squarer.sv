// GF(2^m) squarer: c = a^2 mod f(x), purely combinational.
//
// In a polynomial basis squaring is linear: bit i of a moves to bit 2i of a
// 2m-1 bit polynomial, with zeros in between. That polynomial is then
// reduced by the field polynomial f(x) with a word-level fold: the part at
// and above x^m is multiplied by (f - x^m), a sum of a few shifted copies for
// the sparse NIST trinomials and pentanomials, and added back to the low
// part. Two folds suffice for every Koblitz field; the count comes from
// ecc_pkg::fold_passes. The result is ready in the same clock cycle, as the
// document requires of its squarer.
//
// Interface: a (M bits, input), c (M bits, output). No clock.
module gf2m_squarer #(
  parameter int unsigned M = 163
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] c
);
  localparam int unsigned NT     = ecc_pkg::poly_terms(M);
  localparam int unsigned NPASS  = ecc_pkg::fold_passes(M);

  function automatic logic [M-1:0] square(logic [M-1:0] x);
    logic [2*M-1:0] r, hi;
    r = '0;
    for (int unsigned i = 0; i < M; i++) r[2*i] = x[i];
    for (int unsigned p = 0; p < NPASS; p++) begin
      hi = r >> M;
      r[2*M-1:M] = '0;
      for (int unsigned j = 0; j < NT; j++) r = r ^ (hi << ecc_pkg::poly_tap(M, j));
    end
    return r[M-1:0];
  endfunction

  assign c = square(a);
endmodule
