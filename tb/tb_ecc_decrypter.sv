// Self-checking testbench for ecc_decrypter on K-163 (defaults): ciphertexts
// (C1, C2) = (k*P, M + k*Q) with Q = d*P are built with the reference model,
// and the decrypter, given d, must return the message point M.
module tb_ecc_decrypter;
  import gf_ref_pkg::*;

  localparam int M = 163;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done, c1_inf, c2_inf, m_inf;
  logic [M-1:0] d, c1x, c1y, c2x, c2y, mx, my;

  ecc_decrypter dut (.clk, .rst_n, .start, .d, .c1x, .c1y, .c1_inf, .c2x, .c2y, .c2_inf,
                     .busy, .done, .mx, .my, .m_inf);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t p, q, msg, c1, c2;
    fe_t dd, kk;
    start = 0;
    {d, c1x, c1y, c2x, c2y} = '0;
    c1_inf = 0; c2_inf = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    p = rand_point(M);
    for (int n = 0; n < 3; n++) begin
      dd  = rand_fe(M);
      kk  = rand_fe(M);
      q   = tau_mult(dd, p, M);
      msg = rand_point(M);
      c1  = tau_mult(kk, p, M);
      c2  = add(msg, tau_mult(kk, q, M), M);
      @(negedge clk);
      d = dd[M-1:0];
      c1x = c1.x[M-1:0]; c1y = c1.y[M-1:0]; c1_inf = c1.inf;
      c2x = c2.x[M-1:0]; c2y = c2.y[M-1:0]; c2_inf = c2.inf;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      check("decrypted message", !m_inf && fe_t'(mx) == msg.x && fe_t'(my) == msg.y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
