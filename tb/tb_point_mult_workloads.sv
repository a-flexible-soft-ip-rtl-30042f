// Point-multiplication runs in the multiplier configurations of the
// reference measurements: K-163 with W = 1, 21 and 82 and K-233 with W = 30
// and 117. Each instance multiplies random points by random tau-adic
// scalars; results are compared with the reference model and the cycle
// counts printed next to the published averages (48,863 / 29,463 / 23,061
// for K-163 and 55,889 / 45,449 for K-233), which come from a design whose
// point-multiplication sequence differs from this one. The W = 1 instance
// also exercises the binary divider inside a full point multiplication.
module tb_point_mult_workloads;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 5;
  localparam int MS [N] = '{163, 163, 163, 233, 233};
  localparam int WS [N] = '{1, 21, 82, 30, 117};
  localparam int PAPER [N] = '{48863, 29463, 23061, 55889, 45449};

  logic [N-1:0] start, busy, done, q_inf;
  fe_t k [N], px [N], py [N], qx [N], qy [N];

  for (genvar i = 0; i < N; i++) begin : g_pm
    localparam int M = MS[i];
    logic [M-1:0] x, y;
    ecc_point_mult #(.M(M), .W(WS[i])) dut (
      .clk, .rst_n, .start(start[i]), .k(k[i][M-1:0]), .px(px[i][M-1:0]), .py(py[i][M-1:0]),
      .p_inf(1'b0), .busy(busy[i]), .done(done[i]), .qx(x), .qy(y), .q_inf(q_inf[i]));
    assign qx[i] = fe_t'(x);
    assign qy[i] = fe_t'(y);
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

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t p [N];
    pt_t e, r;
    int  t0, lat [N];
    start = '0;
    for (int i = 0; i < N; i++) begin
      k[i] = '0; px[i] = '0; py[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < N; i++) begin
        p[i]  = rand_point(MS[i]);
        k[i]  = rand_fe(MS[i]);
        px[i] = p[i].x;
        py[i] = p[i].y;
      end
      @(negedge clk);
      start = '1;
      @(negedge clk);
      start = '0;
      t0 = cyc;
      lat = '{default: 0};
      forever begin
        for (int i = 0; i < N; i++) if (done[i]) lat[i] = cyc - t0 + 1;
        if (!(|busy)) break;
        @(negedge clk);
      end
      for (int i = 0; i < N; i++) begin
        e = tau_mult(k[i], p[i], MS[i]);
        r = '0;
        r.inf = q_inf[i];
        if (!r.inf) begin r.x = qx[i]; r.y = qy[i]; end
        check($sformatf("K-%0d W=%0d result", MS[i], WS[i]), r == e);
        $display("K-%0d W=%0d: %0d cycles (%0d 1-digits); published average %0d",
                 MS[i], WS[i], lat[i], $countones(k[i]), PAPER[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
