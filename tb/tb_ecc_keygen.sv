// Self-checking testbench for ecc_keygen on K-163 (defaults): public keys
// for random private keys are compared with the reference model; key_valid
// must drop on start and rise with done.
module tb_ecc_keygen;
  import gf_ref_pkg::*;

  localparam int M = 163;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done, key_valid, q_inf;
  logic [M-1:0] d, px, py, qx, qy;

  ecc_keygen dut (.clk, .rst_n, .start, .d, .px, .py, .busy, .done, .key_valid, .qx, .qy, .q_inf);

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
    pt_t p, e;
    fe_t dd;
    start = 0;
    d = '0; px = '0; py = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check("no key after reset", !key_valid);
    p = rand_point(M);
    for (int n = 0; n < 3; n++) begin
      dd = rand_fe(M);
      @(negedge clk);
      d = dd[M-1:0]; px = p.x[M-1:0]; py = p.y[M-1:0];
      start = 1;
      @(negedge clk);
      start = 0;
      check("key_valid cleared by start", !key_valid && busy);
      while (!done) @(negedge clk);
      e = tau_mult(dd, p, M);
      check("key valid with done", key_valid);
      check("public key", !q_inf && fe_t'(qx) == e.x && fe_t'(qy) == e.y);
      repeat (5) @(negedge clk);
      check("key held", key_valid && fe_t'(qx) == e.x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
