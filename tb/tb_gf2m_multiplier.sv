// Self-checking testbench for gf2m_multiplier. Three K-163 instances with
// the digit sizes of the reference configurations (W = 1, 21, 82) and one
// K-571 instance with W = 72 multiply random operands; products are
// compared with the reference model and the latency, start cycle to done
// cycle, with ceil(M/W) cycles (163, 8, 2 and 8).
module tb_gf2m_multiplier;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start;
  logic [162:0] a, b;
  logic [570:0] a5, b5;
  logic [3:0]   busy, done;
  logic [162:0] c [3];
  logic [570:0] c5;

  gf2m_multiplier #(.M(163), .W(1))  d0 (.clk, .rst_n, .start, .a, .b, .busy(busy[0]), .done(done[0]), .c(c[0]));
  gf2m_multiplier #(.M(163), .W(21)) d1 (.clk, .rst_n, .start, .a, .b, .busy(busy[1]), .done(done[1]), .c(c[1]));
  gf2m_multiplier                    d2 (.clk, .rst_n, .start, .a, .b, .busy(busy[2]), .done(done[2]), .c(c[2]));
  gf2m_multiplier #(.M(571), .W(72)) d3 (.clk, .rst_n, .start, .a(a5), .b(b5), .busy(busy[3]), .done(done[3]), .c(c5));

  int cyc = 0, t0 = 0;
  int lat [4];
  logic [3:0] got;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 4; i++) if (done[i]) begin
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
    int  exp_lat [4] = '{163, 8, 2, 8};
    start = 0; a = '0; b = '0; a5 = '0; b5 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      x = (n == 0) ? fe_t'(1) : (n == 1) ? ~fe_t'(0) : rand_fe(571);
      y = (n == 1) ? ~fe_t'(0) : rand_fe(571);
      @(negedge clk);
      a = x[162:0]; b = y[162:0]; a5 = x; b5 = y;
      start = 1;
      @(negedge clk);
      start = 0;
      got = '0;
      t0 = cyc - 1;
      while (got != 4'hf && cyc - t0 < 400) @(negedge clk);
      for (int i = 0; i < 4; i++) check($sformatf("latency W-instance %0d: %0d", i, lat[i]),
                                      lat[i] == exp_lat[i]);
      check("K-163 W=1",  fe_t'(c[0]) == mul(fe_t'(a), fe_t'(b), 163));
      check("K-163 W=21", fe_t'(c[1]) == mul(fe_t'(a), fe_t'(b), 163));
      check("K-163 W=82", fe_t'(c[2]) == mul(fe_t'(a), fe_t'(b), 163));
      check("K-571 W=72", fe_t'(c5)   == mul(fe_t'(a5), fe_t'(b5), 571));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
