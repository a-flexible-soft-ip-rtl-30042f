// Self-checking testbench for gf2m_div_iti: Itoh-Tsujii division on K-163 with
// W = 82 (default) and W = 21, and on K-233 with W = 30; the latency is
// (m-1) + (N+1)*ceil(m/W) + 2 with N = 9 (K-163) or 10 (K-233).
// Random quotients g/h are compared with the reference model (extended
// Euclidean inversion) and the latency, start cycle to done cycle, with the
// expected counts (184, 244, 322).
module tb_gf2m_div_iti;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [2:0] busy, done, got;
  logic [162:0] g0, h0, z0;
  logic [162:0] g1, h1, z1;
  logic [232:0] g2, h2, z2;

  gf2m_div_iti  d0 (.clk, .rst_n, .start, .g(g0), .h(h0), .busy(busy[0]), .done(done[0]), .z(z0));
  gf2m_div_iti #(.M(163), .W(21)) d1 (.clk, .rst_n, .start, .g(g1), .h(h1), .busy(busy[1]), .done(done[1]), .z(z1));
  gf2m_div_iti #(.M(233), .W(30)) d2 (.clk, .rst_n, .start, .g(g2), .h(h2), .busy(busy[2]), .done(done[2]), .z(z2));

  int cyc = 0, t0 = 0;
  int lat [3];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 3; i++) if (done[i]) begin
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
    g2 = '0; h2 = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      x = (k == 0) ? fe_t'(1) : rand_fe(571);
      y = (k == 1) ? fe_t'(1) : (k == 2) ? ~fe_t'(0) : rand_fe(571);
      @(negedge clk);
      g0 = x[162:0]; h0 = (y[162:0] == '0) ? 163'(1) : y[162:0];
      g1 = x[162:0]; h1 = (y[162:0] == '0) ? 163'(1) : y[162:0];
      g2 = x[232:0]; h2 = (y[232:0] == '0) ? 233'(1) : y[232:0];
      start = 1;
      @(negedge clk);
      start = 0;
      got = '0;
      t0 = cyc - 1;
      while (got != '1 && cyc - t0 < 2000) @(negedge clk);
      check($sformatf("latency 0: %0d", lat[0]), lat[0] == 184);
      check("quotient 0", fe_t'(z0) == div(fe_t'(g0), fe_t'(h0), 163));
      check($sformatf("latency 1: %0d", lat[1]), lat[1] == 244);
      check("quotient 1", fe_t'(z1) == div(fe_t'(g1), fe_t'(h1), 163));
      check($sformatf("latency 2: %0d", lat[2]), lat[2] == 322);
      check("quotient 2", fe_t'(z2) == div(fe_t'(g2), fe_t'(h2), 233));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
