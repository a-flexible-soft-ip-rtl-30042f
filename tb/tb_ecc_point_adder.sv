// Self-checking testbench for ecc_point_adder on K-163 with the default
// W = 82 (Itoh-Tsujii division) and, in a second instance, W = 1 (binary
// division). It covers general addition, doubling, P + (-P), the doubling
// of (0, 1), and additions involving the point at infinity; results are
// compared with the reference model and checked to lie on the curve, and
// latencies with D + ceil(M/W) + 4 cycles (general case) or 2 cycles.
module tb_ecc_point_adder;
  import gf_ref_pkg::*;

  localparam int M = 163;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start;
  logic [M-1:0] x1, y1, x2, y2;
  logic         inf1, inf2;
  logic [1:0]   busy, done, got;
  logic [M-1:0] x3 [2], y3 [2];
  logic         inf3 [2];

  ecc_point_adder dut0 (.clk, .rst_n, .start, .x1, .y1, .inf1, .x2, .y2, .inf2,
                        .busy(busy[0]), .done(done[0]), .x3(x3[0]), .y3(y3[0]), .inf3(inf3[0]));
  ecc_point_adder #(.M(M), .W(1)) dut1 (.clk, .rst_n, .start, .x1, .y1, .inf1, .x2, .y2, .inf2,
                        .busy(busy[1]), .done(done[1]), .x3(x3[1]), .y3(y3[1]), .inf3(inf3[1]));

  int cyc = 0, t0 = 0;
  int lat [2];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 2; i++) if (done[i]) begin
      lat[i] = cyc - t0;
      got[i] = 1'b1;
    end
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int n_add = 0, n_dbl = 0, n_neg = 0, n_inf = 0, n_ord2 = 0;

  task automatic run(pt_t p, pt_t q, bit general);
    pt_t e, r;
    @(negedge clk);
    x1 = p.x[M-1:0]; y1 = p.y[M-1:0]; inf1 = p.inf;
    x2 = q.x[M-1:0]; y2 = q.y[M-1:0]; inf2 = q.inf;
    start = 1;
    @(negedge clk);
    start = 0;
    got = '0;
    t0 = cyc - 1;
    while (got != '1 && cyc - t0 < 2000) @(negedge clk);
    e = add(p, q, M);
    for (int i = 0; i < 2; i++) begin
      r = '0;
      r.inf = inf3[i];
      r.x = fe_t'(x3[i]);
      r.y = fe_t'(y3[i]);
      if (r.inf) begin r.x = '0; r.y = '0; end
      check($sformatf("sum, instance %0d", i), r == e);
      check($sformatf("on curve, instance %0d", i), on_curve(r, M));
    end
    if (general) begin
      check($sformatf("latency W=82: %0d", lat[0]), lat[0] == 184 + 2 + 4);
      check($sformatf("latency W=1: %0d", lat[1]), lat[1] == 326 + 163 + 4);
    end else begin
      check($sformatf("latency special: %0d %0d", lat[0], lat[1]), lat[0] == 2 && lat[1] == 2);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t p, q, o, z;
    start = 0;
    {x1, y1, x2, y2} = '0;
    inf1 = 1; inf2 = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    o = infinity();
    z = '0;
    z.y = fe_t'(1);            // (0, 1) has order two
    check("(0,1) on curve", on_curve(z, M));
    for (int k = 0; k < 6; k++) begin
      p = rand_point(M);
      q = rand_point(M);
      check("stimulus on curve", on_curve(p, M) && on_curve(q, M));
      run(p, q, 1);        n_add++;
      run(p, p, 1);        n_dbl++;
      run(p, neg(p), 0);   n_neg++;
      run(o, q, 0);        n_inf++;
      run(p, o, 0);        n_inf++;
    end
    run(o, o, 0);          n_inf++;
    run(z, z, 0);          n_ord2++;
    run(z, rand_point(M), 1);
    $display("cases: add=%0d double=%0d negation=%0d infinity=%0d order2=%0d",
             n_add, n_dbl, n_neg, n_inf, n_ord2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
