// Self-checking testbench for ecc_encrypter on K-163 (defaults): for random
// k, public keys and message points, C1 = k*P and C2 = M + k*Q are compared
// with the reference model. One message is the point at infinity, so that
// C2 = k*Q.
module tb_ecc_encrypter;
  import gf_ref_pkg::*;

  localparam int M = 163;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done, q_inf, m_inf, c1_inf, c2_inf;
  logic [M-1:0] k, px, py, qx, qy, mx, my, c1x, c1y, c2x, c2y;

  ecc_encrypter dut (.clk, .rst_n, .start, .k, .px, .py, .qx, .qy, .q_inf, .mx, .my, .m_inf,
                     .busy, .done, .c1x, .c1y, .c1_inf, .c2x, .c2y, .c2_inf);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit same(pt_t e, logic inf, logic [M-1:0] x, logic [M-1:0] y);
    if (e.inf || inf) return e.inf == inf;
    return fe_t'(x) == e.x && fe_t'(y) == e.y;
  endfunction

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t p, q, msg, e1, e2;
    fe_t kk;
    start = 0;
    {k, px, py, qx, qy, mx, my} = '0;
    q_inf = 0; m_inf = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    p = rand_point(M);
    for (int n = 0; n < 3; n++) begin
      q   = tau_mult(rand_fe(M), p, M);
      msg = (n == 2) ? infinity() : rand_point(M);
      kk  = rand_fe(M);
      @(negedge clk);
      k = kk[M-1:0]; px = p.x[M-1:0]; py = p.y[M-1:0];
      qx = q.x[M-1:0]; qy = q.y[M-1:0]; q_inf = q.inf;
      mx = msg.x[M-1:0]; my = msg.y[M-1:0]; m_inf = msg.inf;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      e1 = tau_mult(kk, p, M);
      e2 = add(msg, tau_mult(kk, q, M), M);
      check("C1 = k*P", same(e1, c1_inf, c1x, c1y));
      check("C2 = M + k*Q", same(e2, c2_inf, c2x, c2y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
