// ECC soft core datapath: key generation, encryption and decryption of
// elliptic-curve ElGamal over a NIST Koblitz curve in GF(2^m), affine
// coordinates throughout.
//
//   key generation  Q  = d * P                (ecc_keygen:    1 point multiplier)
//   encryption      C1 = k * P, C2 = M + k*Q  (ecc_encrypter: 2 point multipliers, 1 adder)
//   decryption      M  = C2 - d * C1          (ecc_decrypter: 1 point multiplier, 1 adder)
//
// The three units have their own controllers and ports and can all run at
// the same time. The curve is picked by M (163, 233, 283, 409 or 571) and
// the speed/area trade-off by W, the multiplier's bits per cycle (1 up to
// ceil(M/2)); the inversion architecture follows from both (ARCH = 0) or
// can be forced (1 binary, 2 Itoh-Tsujii). P is the curve's generator
// point, given as an input. Private keys d and per-message numbers k are
// tau-adic digit strings of M digits (see ecc_point_mult). Messages are curve
// points.
//
// Every unit uses the same handshake: a one-cycle start with the operands
// valid, busy while it works, and a one-cycle done with the results, which
// hold until the unit's next start.
module ecc_core #(
  parameter int unsigned M    = 163,
  parameter int unsigned W    = 82,
  parameter int unsigned ARCH = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  // curve generator point P
  input  logic [M-1:0] gx,
  input  logic [M-1:0] gy,
  // key generation
  input  logic         kg_start,
  input  logic [M-1:0] kg_d,
  output logic         kg_busy,
  output logic         kg_done,
  output logic         kg_valid,
  output logic [M-1:0] kg_qx,
  output logic [M-1:0] kg_qy,
  output logic         kg_q_inf,
  // encryption
  input  logic         enc_start,
  input  logic [M-1:0] enc_k,
  input  logic [M-1:0] enc_qx,
  input  logic [M-1:0] enc_qy,
  input  logic         enc_q_inf,
  input  logic [M-1:0] enc_mx,
  input  logic [M-1:0] enc_my,
  input  logic         enc_m_inf,
  output logic         enc_busy,
  output logic         enc_done,
  output logic [M-1:0] enc_c1x,
  output logic [M-1:0] enc_c1y,
  output logic         enc_c1_inf,
  output logic [M-1:0] enc_c2x,
  output logic [M-1:0] enc_c2y,
  output logic         enc_c2_inf,
  // decryption
  input  logic         dec_start,
  input  logic [M-1:0] dec_d,
  input  logic [M-1:0] dec_c1x,
  input  logic [M-1:0] dec_c1y,
  input  logic         dec_c1_inf,
  input  logic [M-1:0] dec_c2x,
  input  logic [M-1:0] dec_c2y,
  input  logic         dec_c2_inf,
  output logic         dec_busy,
  output logic         dec_done,
  output logic [M-1:0] dec_mx,
  output logic [M-1:0] dec_my,
  output logic         dec_m_inf
);
  ecc_keygen #(.M(M), .W(W), .ARCH(ARCH)) u_keygen (
    .clk, .rst_n, .start(kg_start), .d(kg_d), .px(gx), .py(gy),
    .busy(kg_busy), .done(kg_done), .key_valid(kg_valid),
    .qx(kg_qx), .qy(kg_qy), .q_inf(kg_q_inf)
  );

  ecc_encrypter #(.M(M), .W(W), .ARCH(ARCH)) u_enc (
    .clk, .rst_n, .start(enc_start), .k(enc_k), .px(gx), .py(gy),
    .qx(enc_qx), .qy(enc_qy), .q_inf(enc_q_inf),
    .mx(enc_mx), .my(enc_my), .m_inf(enc_m_inf),
    .busy(enc_busy), .done(enc_done),
    .c1x(enc_c1x), .c1y(enc_c1y), .c1_inf(enc_c1_inf),
    .c2x(enc_c2x), .c2y(enc_c2y), .c2_inf(enc_c2_inf)
  );

  ecc_decrypter #(.M(M), .W(W), .ARCH(ARCH)) u_dec (
    .clk, .rst_n, .start(dec_start), .d(dec_d),
    .c1x(dec_c1x), .c1y(dec_c1y), .c1_inf(dec_c1_inf),
    .c2x(dec_c2x), .c2y(dec_c2y), .c2_inf(dec_c2_inf),
    .busy(dec_busy), .done(dec_done),
    .mx(dec_mx), .my(dec_my), .m_inf(dec_m_inf)
  );
endmodule
