// Point multiplier for Koblitz curves: Q = k.P, k given in tau-adic form.
//
// On a Koblitz curve the Frobenius map tau(x, y) = (x^2, y^2) is a curve
// endomorphism that costs only two squarings, the two squarers that sit
// beside the point adder in this unit. The scalar is read as the digit
// string k = sum k_i * tau^i with digits k_i in {0, 1}, i = M-1 .. 0, and
// evaluated Horner-style:
//     Q = O;  for i = M-1 downto 0:  Q = tau(Q);  if k_i = 1: Q = Q + P
// so a point multiplication is M Frobenius steps of one cycle each plus one
// point addition per 1-digit. tau acts on the prime-order subgroup as
// multiplication by a fixed integer, so each digit string stands for an
// integer scalar and key pairs built with it work like ordinary ones. The
// digit representation of k is this design's reading of the document's
// point multiplier; the document names its parts but not its algorithm.
//
// Interface and timing: pulse start with k and P valid; P may be the point
// at infinity (p_inf). done is high for one cycle with Q on (qx, qy, q_inf),
// which hold until the next start. Latency: 1 + M + (number of 1-digits) *
// (1 + point-addition latency) cycles, plus one cycle to raise done.
module ecc_point_mult #(
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
  input  logic         p_inf,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] qx,
  output logic [M-1:0] qy,
  output logic         q_inf
);
  localparam int unsigned IW = $clog2(M);

  typedef enum logic [2:0] {S_IDLE, S_FROB, S_ADD, S_WAIT, S_DONE} state_t;

  state_t        state;
  logic [M-1:0]  k_r, px_r, py_r;
  logic          pinf_r;
  logic [IW-1:0] idx;
  logic [M-1:0]  fx, fy, sx, sy;
  logic          a_start, a_busy, a_done, s_inf;

  gf2m_squarer #(.M(M)) u_sq_x (.a(qx), .c(fx));
  gf2m_squarer #(.M(M)) u_sq_y (.a(qy), .c(fy));

  ecc_point_adder #(.M(M), .W(W), .ARCH(ARCH)) u_add (
    .clk, .rst_n, .start(a_start),
    .x1(qx), .y1(qy), .inf1(q_inf),
    .x2(px_r), .y2(py_r), .inf2(pinf_r),
    .busy(a_busy), .done(a_done), .x3(sx), .y3(sy), .inf3(s_inf)
  );

  assign a_start = (state == S_ADD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      k_r    <= '0;
      px_r   <= '0;
      py_r   <= '0;
      pinf_r <= 1'b1;
      idx    <= '0;
      qx     <= '0;
      qy     <= '0;
      q_inf  <= 1'b1;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          k_r    <= k;
          px_r   <= px;
          py_r   <= py;
          pinf_r <= p_inf;
          qx     <= '0;
          qy     <= '0;
          q_inf  <= 1'b1;
          idx    <= IW'(M - 1);
          state  <= S_FROB;
        end
        S_FROB: begin
          qx <= fx;
          qy <= fy;
          if (k_r[idx])        state <= S_ADD;
          else if (idx == '0)  state <= S_DONE;
          else                 idx   <= idx - 1'b1;
        end
        S_ADD: state <= S_WAIT;
        S_WAIT: if (a_done) begin
          qx    <= sx;
          qy    <= sy;
          q_inf <= s_inf;
          if (idx == '0) state <= S_DONE;
          else begin
            idx   <= idx - 1'b1;
            state <= S_FROB;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("ecc_point_mult: start while busy");
  a_add_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n) a_start |-> !a_busy)
    else $error("ecc_point_mult: adder started while busy");
endmodule
