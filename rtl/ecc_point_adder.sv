// Affine point adder on a Koblitz curve y^2 + xy = x^3 + a*x^2 + 1 over
// GF(2^m): (x3, y3) = (x1, y1) + (x2, y2).
//
// Built from the operators the document places in its point adder: one
// divider, one multiplier and two squarers. The formulas are the standard
// affine ones for binary curves:
//   addition (x1 != x2):  L = (y1+y2)/(x1+x2),  x3 = L^2 + L + x1 + x2 + a,
//                         y3 = L*(x1+x3) + x3 + y1
//   doubling (equal points, x1 != 0):  L = x1 + y1/x1,  x3 = L^2 + L + a,
//                         y3 = x1^2 + L*x3 + x3
// One squarer forms L^2, the other x1^2. The point at infinity travels as
// a flag next to the coordinates; P + O, O + P, P + (-P) and the doubling of
// a point with x = 0 give their results in the classify cycle.
//
// Interface and timing: pulse start with both points valid. done is high
// for one cycle with the sum on (x3, y3, inf3), which hold until the next
// start. An addition or doubling takes D + ceil(M/W) + 4 cycles,
// D being the divider's latency; the special cases take 2 cycles. The
// control sequence and the handshake are this design's own.
module ecc_point_adder #(
  parameter int unsigned M    = 163,
  parameter int unsigned W    = 82,
  parameter int unsigned ARCH = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] x1,
  input  logic [M-1:0] y1,
  input  logic         inf1,
  input  logic [M-1:0] x2,
  input  logic [M-1:0] y2,
  input  logic         inf2,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] x3,
  output logic [M-1:0] y3,
  output logic         inf3
);
  localparam logic [M-1:0] A = M'(ecc_pkg::curve_a(M));

  typedef enum logic [2:0] {S_IDLE, S_CLS, S_DIV, S_MST, S_MUL} state_t;

  state_t       state;
  logic [M-1:0] ax, ay, bx, by, lam;
  logic         ainf, binf, dbl;
  logic         d_start, d_busy, d_done, m_start, m_busy, m_done;
  logic [M-1:0] d_g, d_h, d_z, m_b, m_c;
  logic [M-1:0] lam_c, lam_sq, x1_sq, x3_c;

  gf2m_divider #(.M(M), .W(W), .ARCH(ARCH)) u_div (
    .clk, .rst_n, .start(d_start), .g(d_g), .h(d_h),
    .busy(d_busy), .done(d_done), .z(d_z)
  );

  gf2m_multiplier #(.M(M), .W(W)) u_mul (
    .clk, .rst_n, .start(m_start), .a(lam), .b(m_b),
    .busy(m_busy), .done(m_done), .c(m_c)
  );

  gf2m_squarer #(.M(M)) u_sq_lam (.a(lam_c), .c(lam_sq));
  gf2m_squarer #(.M(M)) u_sq_x1  (.a(ax),    .c(x1_sq));

  // Divider operands: (y1+y2)/(x1+x2) for an addition, y1/x1 for a doubling.
  assign d_g = dbl ? ay : (ay ^ by);
  assign d_h = dbl ? ax : (ax ^ bx);

  // Slope and x3, formed in the cycle the quotient arrives.
  assign lam_c = dbl ? (d_z ^ ax) : d_z;
  assign x3_c  = lam_sq ^ lam_c ^ A ^ (dbl ? '0 : (ax ^ bx));

  assign m_b     = dbl ? x3 : (ax ^ x3);
  assign m_start = (state == S_MST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      {ax, ay, bx, by, lam} <= '0;
      {ainf, binf, dbl}     <= '0;
      x3      <= '0;
      y3      <= '0;
      inf3    <= 1'b1;
      done    <= 1'b0;
      d_start <= 1'b0;
    end else begin
      done    <= 1'b0;
      d_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          ax <= x1;  ay <= y1;  ainf <= inf1;
          bx <= x2;  by <= y2;  binf <= inf2;
          state <= S_CLS;
        end
        S_CLS: begin
          state <= S_IDLE;
          done  <= 1'b1;
          if (ainf) begin
            {x3, y3, inf3} <= {bx, by, binf};
          end else if (binf) begin
            {x3, y3, inf3} <= {ax, ay, 1'b0};
          end else if (ax == bx && (ay != by || ax == '0)) begin
            // P + (-P), or the doubling of a point of order two.
            {x3, y3, inf3} <= {M'(0), M'(0), 1'b1};
          end else begin
            dbl     <= (ax == bx);
            d_start <= 1'b1;
            done    <= 1'b0;
            state   <= S_DIV;
          end
        end
        S_DIV: if (d_done) begin
          lam   <= lam_c;
          x3    <= x3_c;
          inf3  <= 1'b0;
          state <= S_MST;
        end
        S_MST: state <= S_MUL;
        S_MUL: if (m_done) begin
          y3    <= m_c ^ x3 ^ (dbl ? x1_sq : ay);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("ecc_point_adder: start while busy");
  a_div_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n) d_start |-> !d_busy)
    else $error("ecc_point_adder: divider started while busy");
  a_mul_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n) m_start |-> !m_busy)
    else $error("ecc_point_adder: multiplier started while busy");
endmodule
