// Self-checking testbench for ecc_point_mult on K-163 with the default
// W = 82. Random tau-adic scalars and random curve points are multiplied and
// compared with the reference model; the edge cases k = 0, k = 1 (Q = P),
// k = tau (Q = (x^2, y^2)) and P = infinity are included. The latency is
// checked against M + 2 + (number of 1-digits) + the point additions: 2
// cycles for the first one (onto infinity) and 190 cycles for each other.
module tb_ecc_point_mult;
  import gf_ref_pkg::*;

  localparam int M = 163;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done, p_inf, q_inf;
  logic [M-1:0] k, px, py, qx, qy;

  ecc_point_mult dut (.clk, .rst_n, .start, .k, .px, .py, .p_inf, .busy, .done, .qx, .qy, .q_inf);

  int cyc = 0, t0 = 0, lat = 0;
  bit got;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (done) begin
      lat = cyc - t0;
      got = 1'b1;
    end
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(fe_t kk, pt_t p, bit timed);
    pt_t e, r;
    int  ones;
    @(negedge clk);
    k = kk[M-1:0]; px = p.x[M-1:0]; py = p.y[M-1:0]; p_inf = p.inf;
    start = 1;
    @(negedge clk);
    start = 0;
    got = 0;
    t0 = cyc - 1;
    while (!got && cyc - t0 < 100000) @(negedge clk);
    e = tau_mult(kk, p, M);
    r = '0;
    r.inf = q_inf;
    if (!q_inf) begin
      r.x = fe_t'(qx);
      r.y = fe_t'(qy);
    end
    check("k.P matches model", r == e);
    check("k.P on curve", on_curve(r, M));
    ones = $countones(kk[M-1:0]);
    if (timed)
      check($sformatf("latency %0d", lat), lat == M + 2 + ones + 2 + (ones - 1) * 190);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t p, t;
    fe_t kk;
    start = 0;
    k = '0; px = '0; py = '0; p_inf = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    p = rand_point(M);
    run(fe_t'(0), p, 0);
    check("0.P = O", q_inf);
    run(fe_t'(1), p, 0);
    check("1.P = P", !q_inf && qx == p.x[M-1:0] && qy == p.y[M-1:0]);
    run(fe_t'(2), p, 0);
    t = frob(p, M);
    check("tau.P = (x^2, y^2)", !q_inf && qx == t.x[M-1:0] && qy == t.y[M-1:0]);
    run(rand_fe(M), infinity(), 0);
    check("k.O = O", q_inf);
    for (int n = 0; n < 3; n++) begin
      kk = rand_fe(M);
      kk[M-1] = 1'b1;
      run(kk, rand_point(M), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
