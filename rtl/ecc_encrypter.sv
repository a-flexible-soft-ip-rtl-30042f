// Encrypter: C1 = k * P and C2 = M + k * Q.
//
// Two point multipliers run side by side, one on the generator P and one
// on the receiver's public key Q, with the same per-message random number
// k (a tau-adic digit string). When both have finished, a point adder adds
// the message point to k*Q. The message must already be a curve point;
// mapping data onto points is outside this unit.
//
// Interface and timing: pulse start with k, P, Q and the message point
// valid. done is high for one cycle with (c1x, c1y, c1_inf) and
// (c2x, c2y, c2_inf) valid; they hold until the next start. Latency: the
// slower of the two point multiplications, one point addition and a few
// cycles of sequencing. The sequencing is this design's own.
module ecc_encrypter #(
  parameter int unsigned M    = 163,
  parameter int unsigned W    = 82,
  parameter int unsigned ARCH = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic [M-1:0] px,
  input  logic [M-1:0] py,
  input  logic [M-1:0] qx,
  input  logic [M-1:0] qy,
  input  logic         q_inf,
  input  logic [M-1:0] mx,
  input  logic [M-1:0] my,
  input  logic         m_inf,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c1x,
  output logic [M-1:0] c1y,
  output logic         c1_inf,
  output logic [M-1:0] c2x,
  output logic [M-1:0] c2y,
  output logic         c2_inf
);
  typedef enum logic [1:0] {S_IDLE, S_MUL, S_ADD, S_WAIT} state_t;

  state_t       state;
  logic [M-1:0] mx_r, my_r;
  logic         minf_r;
  logic         got_kp, got_kq;
  logic         pm1_done, pm2_done, pa_start, pa_done;
  logic         pm1_busy, pm2_busy, pa_busy;
  logic [M-1:0] kp_x, kp_y, kq_x, kq_y, s_x, s_y;
  logic         kp_inf, kq_inf, s_inf;

  ecc_point_mult #(.M(M), .W(W), .ARCH(ARCH)) u_pm_kp (
    .clk, .rst_n, .start(start && state == S_IDLE), .k, .px, .py, .p_inf(1'b0),
    .busy(pm1_busy), .done(pm1_done), .qx(kp_x), .qy(kp_y), .q_inf(kp_inf)
  );

  ecc_point_mult #(.M(M), .W(W), .ARCH(ARCH)) u_pm_kq (
    .clk, .rst_n, .start(start && state == S_IDLE), .k, .px(qx), .py(qy), .p_inf(q_inf),
    .busy(pm2_busy), .done(pm2_done), .qx(kq_x), .qy(kq_y), .q_inf(kq_inf)
  );

  ecc_point_adder #(.M(M), .W(W), .ARCH(ARCH)) u_add (
    .clk, .rst_n, .start(pa_start),
    .x1(mx_r), .y1(my_r), .inf1(minf_r),
    .x2(kq_x), .y2(kq_y), .inf2(kq_inf),
    .busy(pa_busy), .done(pa_done), .x3(s_x), .y3(s_y), .inf3(s_inf)
  );

  assign pa_start = (state == S_ADD);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mx_r   <= '0;
      my_r   <= '0;
      minf_r <= 1'b1;
      got_kp <= 1'b0;
      got_kq <= 1'b0;
      c1x    <= '0;
      c1y    <= '0;
      c1_inf <= 1'b1;
      c2x    <= '0;
      c2y    <= '0;
      c2_inf <= 1'b1;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          mx_r   <= mx;
          my_r   <= my;
          minf_r <= m_inf;
          got_kp <= 1'b0;
          got_kq <= 1'b0;
          state  <= S_MUL;
        end
        S_MUL: begin
          if (pm1_done) got_kp <= 1'b1;
          if (pm2_done) got_kq <= 1'b1;
          if ((got_kp || pm1_done) && (got_kq || pm2_done)) state <= S_ADD;
        end
        S_ADD: state <= S_WAIT;
        S_WAIT: if (pa_done) begin
          {c1x, c1y, c1_inf} <= {kp_x, kp_y, kp_inf};
          {c2x, c2y, c2_inf} <= {s_x, s_y, s_inf};
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The adder is never started before both products are ready.
  a_add_after_mults: assert property (@(posedge clk) disable iff (!rst_n)
    pa_start |-> !pm1_busy && !pm2_busy && !pa_busy)
    else $error("ecc_encrypter: addition started early");
endmodule
