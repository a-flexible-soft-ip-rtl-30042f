// End-to-end testbench for ecc_core at its default parameters (K-163,
// W = 82, Itoh-Tsujii inversion), which is also its full-size run.
//
// Alice generates a key pair (d, Q = d*P) with the key generation unit on
// the NIST K-163 base point. Bob encrypts a message point with Q; the
// decrypter, given d, must return the message. A second round runs all
// three units at the same time: a new key generation, an encryption under
// the first key and the decryption of the first ciphertext. Results are
// also compared with the reference model. The testbench counts how often
// each mechanism of the design was exercised (Frobenius steps, general
// point additions, additions resolved in the classify step such as those
// onto the point at infinity, Itoh-Tsujii divisions, all three units busy
// at once) and counts a failure for any that never happened.
module tb_ecc_core;
  import gf_ref_pkg::*;

  localparam int M = 163;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // NIST K-163 base point.
  localparam logic [M-1:0] GX = 163'h2_fe13c053_7bbc11ac_aa07d793_de4e6d5e_5c94eee8;
  localparam logic [M-1:0] GY = 163'h2_89070fb0_5d38ff58_321f2e80_0536d538_ccdaa3d9;

  logic         kg_start, kg_busy, kg_done, kg_valid, kg_q_inf;
  logic [M-1:0] kg_d, kg_qx, kg_qy;
  logic         enc_start, enc_q_inf, enc_m_inf, enc_busy, enc_done, enc_c1_inf, enc_c2_inf;
  logic [M-1:0] enc_k, enc_qx, enc_qy, enc_mx, enc_my, enc_c1x, enc_c1y, enc_c2x, enc_c2y;
  logic         dec_start, dec_c1_inf, dec_c2_inf, dec_busy, dec_done, dec_m_inf;
  logic [M-1:0] dec_d, dec_c1x, dec_c1y, dec_c2x, dec_c2y, dec_mx, dec_my;

  ecc_core dut (
    .clk, .rst_n, .gx(GX), .gy(GY),
    .kg_start, .kg_d, .kg_busy, .kg_done, .kg_valid, .kg_qx, .kg_qy, .kg_q_inf,
    .enc_start, .enc_k, .enc_qx, .enc_qy, .enc_q_inf, .enc_mx, .enc_my, .enc_m_inf,
    .enc_busy, .enc_done, .enc_c1x, .enc_c1y, .enc_c1_inf, .enc_c2x, .enc_c2y, .enc_c2_inf,
    .dec_start, .dec_d, .dec_c1x, .dec_c1y, .dec_c1_inf, .dec_c2x, .dec_c2y, .dec_c2_inf,
    .dec_busy, .dec_done, .dec_mx, .dec_my, .dec_m_inf
  );

  // Mechanism counters, taken from the key generation unit's datapath and
  // from the unit-level busy flags.
  int n_frob = 0, n_add = 0, n_special = 0, n_iti = 0, n_concurrent = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_keygen.u_pm.state == dut.u_keygen.u_pm.S_FROB) n_frob++;
    if (dut.u_keygen.u_pm.u_add.state == dut.u_keygen.u_pm.u_add.S_CLS) begin
      if (dut.u_keygen.u_pm.u_add.ainf || dut.u_keygen.u_pm.u_add.binf) n_special++;
      else n_add++;
    end
    if (dut.u_keygen.u_pm.u_add.u_div.g_iti.u_div.done) n_iti++;
    if (kg_busy && enc_busy && dec_busy) n_concurrent++;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic pt_t pt(logic inf, logic [M-1:0] x, logic [M-1:0] y);
    pt_t p;
    p.inf = inf;
    p.x = inf ? '0 : fe_t'(x);
    p.y = inf ? '0 : fe_t'(y);
    return p;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t g, q1, q2, msg1, msg2, c1, c2, c1b, c2b;
    fe_t d1, d2, k1, k2;
    int  t0;
    {kg_start, enc_start, dec_start} = '0;
    {kg_d, enc_k, enc_qx, enc_qy, enc_mx, enc_my, dec_d, dec_c1x, dec_c1y, dec_c2x, dec_c2y} = '0;
    {enc_q_inf, enc_m_inf, dec_c1_inf, dec_c2_inf} = '0;
    g = pt(1'b0, GX, GY);
    check("base point on K-163", on_curve(g, M));
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Round 1: key generation, then encryption, then decryption.
    d1 = rand_fe(M);
    @(negedge clk);
    kg_d = d1[M-1:0]; kg_start = 1;
    @(negedge clk);
    kg_start = 0;
    t0 = cyc;
    while (!kg_done) @(negedge clk);
    $display("key generation: %0d cycles", cyc - t0);
    q1 = pt(kg_q_inf, kg_qx, kg_qy);
    check("public key matches model", q1 == tau_mult(d1, g, M));
    check("public key on curve", on_curve(q1, M));

    msg1 = tau_mult(rand_fe(M), g, M);
    k1 = rand_fe(M);
    @(negedge clk);
    enc_k = k1[M-1:0]; enc_qx = q1.x[M-1:0]; enc_qy = q1.y[M-1:0]; enc_q_inf = q1.inf;
    enc_mx = msg1.x[M-1:0]; enc_my = msg1.y[M-1:0]; enc_m_inf = msg1.inf;
    enc_start = 1;
    @(negedge clk);
    enc_start = 0;
    t0 = cyc;
    while (!enc_done) @(negedge clk);
    $display("encryption: %0d cycles", cyc - t0);
    c1 = pt(enc_c1_inf, enc_c1x, enc_c1y);
    c2 = pt(enc_c2_inf, enc_c2x, enc_c2y);
    check("C1 matches model", c1 == tau_mult(k1, g, M));
    check("C2 matches model", c2 == add(msg1, tau_mult(k1, q1, M), M));

    @(negedge clk);
    dec_d = d1[M-1:0];
    dec_c1x = c1.x[M-1:0]; dec_c1y = c1.y[M-1:0]; dec_c1_inf = c1.inf;
    dec_c2x = c2.x[M-1:0]; dec_c2y = c2.y[M-1:0]; dec_c2_inf = c2.inf;
    dec_start = 1;
    @(negedge clk);
    dec_start = 0;
    t0 = cyc;
    while (!dec_done) @(negedge clk);
    $display("decryption: %0d cycles", cyc - t0);
    check("decryption recovers the message", pt(dec_m_inf, dec_mx, dec_my) == msg1);

    // Round 2: all three units at once.
    d2 = rand_fe(M);
    k2 = rand_fe(M);
    msg2 = tau_mult(rand_fe(M), g, M);
    @(negedge clk);
    kg_d = d2[M-1:0];
    enc_k = k2[M-1:0];
    enc_mx = msg2.x[M-1:0]; enc_my = msg2.y[M-1:0]; enc_m_inf = msg2.inf;
    {kg_start, enc_start, dec_start} = 3'b111;
    @(negedge clk);
    {kg_start, enc_start, dec_start} = '0;
    fork
      while (!kg_done) @(negedge clk);
      while (!enc_done) @(negedge clk);
      while (!dec_done) @(negedge clk);
    join
    q2 = pt(kg_q_inf, kg_qx, kg_qy);
    check("second public key", q2 == tau_mult(d2, g, M));
    check("second decryption", pt(dec_m_inf, dec_mx, dec_my) == msg1);
    c1b = pt(enc_c1_inf, enc_c1x, enc_c1y);
    c2b = pt(enc_c2_inf, enc_c2x, enc_c2y);

    // Round 3: decrypt the concurrent encryption.
    @(negedge clk);
    dec_c1x = c1b.x[M-1:0]; dec_c1y = c1b.y[M-1:0]; dec_c1_inf = c1b.inf;
    dec_c2x = c2b.x[M-1:0]; dec_c2y = c2b.y[M-1:0]; dec_c2_inf = c2b.inf;
    dec_start = 1;
    @(negedge clk);
    dec_start = 0;
    while (!dec_done) @(negedge clk);
    check("third decryption", pt(dec_m_inf, dec_mx, dec_my) == msg2);

    $display("mechanisms: frobenius=%0d additions=%0d special=%0d itoh_tsujii=%0d concurrent_cycles=%0d",
             n_frob, n_add, n_special, n_iti, n_concurrent);
    check("Frobenius steps happened", n_frob > 0);
    check("general additions happened", n_add > 0);
    check("special-case additions happened", n_special > 0);
    check("Itoh-Tsujii divisions happened", n_iti > 0);
    check("three units ran at once", n_concurrent > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
