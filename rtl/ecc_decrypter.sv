// Decrypter: M = C2 - d * C1.
//
// One point multiplier forms S = d * C1 with the private key d (a
// tau-adic digit string). Negation on a binary curve is free,
// -(x, y) = (x, x + y), so a point adder then computes C2 + (-S), which is
// the message point when C1 and C2 come from the encrypter with the
// matching public key.
//
// Interface and timing: pulse start with d, C1 and C2 valid. done is high
// for one cycle with the message point on (mx, my, m_inf), which holds until
// the next start. Latency: one point multiplication, one point addition
// and a few cycles of sequencing; the sequencing is this design's own.
module ecc_decrypter #(
  parameter int unsigned M    = 163,
  parameter int unsigned W    = 82,
  parameter int unsigned ARCH = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] d,
  input  logic [M-1:0] c1x,
  input  logic [M-1:0] c1y,
  input  logic         c1_inf,
  input  logic [M-1:0] c2x,
  input  logic [M-1:0] c2y,
  input  logic         c2_inf,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] mx,
  output logic [M-1:0] my,
  output logic         m_inf
);
  typedef enum logic [1:0] {S_IDLE, S_MUL, S_ADD, S_WAIT} state_t;

  state_t       state;
  logic [M-1:0] c2x_r, c2y_r;
  logic         c2inf_r;
  logic         pm_busy, pm_done, pa_start, pa_busy, pa_done;
  logic [M-1:0] s_x, s_y, r_x, r_y;
  logic         s_inf, r_inf;

  ecc_point_mult #(.M(M), .W(W), .ARCH(ARCH)) u_pm (
    .clk, .rst_n, .start(start && state == S_IDLE), .k(d), .px(c1x), .py(c1y), .p_inf(c1_inf),
    .busy(pm_busy), .done(pm_done), .qx(s_x), .qy(s_y), .q_inf(s_inf)
  );

  // C2 + (-S), with -S = (Sx, Sx + Sy).
  ecc_point_adder #(.M(M), .W(W), .ARCH(ARCH)) u_add (
    .clk, .rst_n, .start(pa_start),
    .x1(c2x_r), .y1(c2y_r), .inf1(c2inf_r),
    .x2(s_x), .y2(s_x ^ s_y), .inf2(s_inf),
    .busy(pa_busy), .done(pa_done), .x3(r_x), .y3(r_y), .inf3(r_inf)
  );

  assign pa_start = (state == S_ADD);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      c2x_r   <= '0;
      c2y_r   <= '0;
      c2inf_r <= 1'b1;
      mx      <= '0;
      my      <= '0;
      m_inf   <= 1'b1;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          c2x_r   <= c2x;
          c2y_r   <= c2y;
          c2inf_r <= c2_inf;
          state   <= S_MUL;
        end
        S_MUL:  if (pm_done) state <= S_ADD;
        S_ADD:  state <= S_WAIT;
        S_WAIT: if (pa_done) begin
          {mx, my, m_inf} <= {r_x, r_y, r_inf};
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_add_after_mult: assert property (@(posedge clk) disable iff (!rst_n)
    pa_start |-> !pm_busy && !pa_busy)
    else $error("ecc_decrypter: addition started early");
endmodule
