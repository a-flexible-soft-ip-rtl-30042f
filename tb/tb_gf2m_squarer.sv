// Self-checking testbench for gf2m_squarer: random operands on the K-163,
// K-233 and K-571 fields (pentanomial, trinomial, pentanomial) compared
// with the reference model's square.
module tb_gf2m_squarer;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [162:0] a163, c163;
  logic [232:0] a233, c233;
  logic [570:0] a571, c571;

  gf2m_squarer #(.M(163)) dut163 (.a(a163), .c(c163));
  gf2m_squarer #(.M(233)) dut233 (.a(a233), .c(c233));
  gf2m_squarer #(.M(571)) dut571 (.a(a571), .c(c571));

  task automatic check(string what, fe_t got, fe_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t x;
    for (int n = 0; n < 200; n++) begin
      x = (n == 0) ? fe_t'(0) : (n == 1) ? fe_t'(1) : (n == 2) ? ~fe_t'(0) : rand_fe(571);
      a163 = x[162:0];
      a233 = x[232:0];
      a571 = x;
      #1;
      check("K-163", fe_t'(c163), sqr(fe_t'(a163), 163));
      check("K-233", fe_t'(c233), sqr(fe_t'(a233), 233));
      check("K-571", fe_t'(c571), sqr(fe_t'(a571), 571));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
