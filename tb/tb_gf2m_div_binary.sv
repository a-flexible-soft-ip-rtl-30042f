// Self-checking testbench for gf2m_div_binary: the binary algorithm on K-163
// (default) and K-233, 2m cycles each.
// Random quotients g/h are compared with the reference model (extended
// Euclidean inversion) and the latency, start cycle to done cycle, with the
// expected counts (326, 466).
module tb_gf2m_div_binary;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [1:0] busy, done, got;
  logic [162:0] g0, h0, z0;
  logic [232:0] g1, h1, z1;

  gf2m_div_binary  d0 (.clk, .rst_n, .start, .g(g0), .h(h0), .busy(busy[0]), .done(done[0]), .z(z0));
  gf2m_div_binary #(.M(233)) d1 (.clk, .rst_n, .start, .g(g1), .h(h1), .busy(busy[1]), .done(done[1]), .z(z1));

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

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t x, y;
    start = 0;
    g0 = '0; h0 = '1;
    g1 = '0; h1 = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      x = (k == 0) ? fe_t'(1) : rand_fe(571);
      y = (k == 1) ? fe_t'(1) : (k == 2) ? ~fe_t'(0) : rand_fe(571);
      @(negedge clk);
      g0 = x[162:0]; h0 = (y[162:0] == '0) ? 163'(1) : y[162:0];
      g1 = x[232:0]; h1 = (y[232:0] == '0) ? 233'(1) : y[232:0];
      start = 1;
      @(negedge clk);
      start = 0;
      got = '0;
      t0 = cyc - 1;
      while (got != '1 && cyc - t0 < 2000) @(negedge clk);
      check($sformatf("latency 0: %0d", lat[0]), lat[0] == 326);
      check("quotient 0", fe_t'(z0) == div(fe_t'(g0), fe_t'(h0), 163));
      check($sformatf("latency 1: %0d", lat[1]), lat[1] == 466);
      check("quotient 1", fe_t'(z1) == div(fe_t'(g1), fe_t'(h1), 233));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
