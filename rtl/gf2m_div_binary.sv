// GF(2^m) divider, binary algorithm: z = g / h mod f(x) in 2m clock cycles.
//
// This is the small-area inversion/division architecture. It is a binary
// extended Euclidean algorithm that divides by x instead of dividing
// polynomials. Two pairs (a, u) and (b, v) satisfy a*g = u*h and b*g = v*h
// (mod f), starting from (h, g) and (f, 0). Each cycle does one step:
//   - a even:  a = a/x,  u = u/x mod f;
//   - a odd:   if the degree bound of a is below that of b, the pairs are
//              swapped first; then a = (a+b)/x, u = (u+v)/x mod f.
// da and db are upper bounds on the degrees of a and b. Each step lowers
// da + db, which starts at 2m-1, by exactly one, so after 2m-1 steps either
// a = 0 or a = b = 1; in both cases b = gcd(h, f) = 1 and so v = g/h. With
// the cycle that loads the operands a division takes 2m cycles. The step count is fixed, so the latency does
// not depend on the data. u/x mod f is u >> 1, after adding f when u is odd.
// The document gives only the algorithm's name and its 2m-cycle latency; the
// step rule above is this design's choice of a binary algorithm with that
// latency.
//
// Interface and timing: pulse start with g and h valid (h must not be 0).
// done is high for one cycle 2*M cycles after the start cycle, with the
// quotient on z; z holds until the next start. busy is high in between.
module gf2m_div_binary #(
  parameter int unsigned M = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] g,
  input  logic [M-1:0] h,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] z
);
  localparam logic [M:0] F = {1'b1, ecc_pkg::poly_low(M)[M-1:0]};
  localparam int unsigned DW = $clog2(2 * M + 1) + 2;   // signed degree bounds
  localparam int unsigned CW = $clog2(2 * M + 1);

  logic [M:0]          a, b;
  logic [M-1:0]        u, v;
  logic signed [DW-1:0] da, db;
  logic [CW-1:0]       cnt;

  // p / x mod f for a residue p of degree < m.
  function automatic logic [M-1:0] div_x(logic [M-1:0] p);
    logic [M:0] t;
    t = p[0] ? ({1'b0, p} ^ F) : {1'b0, p};
    return t[M:1];
  endfunction

  assign z = v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a    <= '0;
      b    <= '0;
      u    <= '0;
      v    <= '0;
      da   <= '0;
      db   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a    <= {1'b0, h};
        b    <= F;
        u    <= g;
        v    <= '0;
        da   <= DW'(M - 1);
        db   <= DW'(M);
        cnt  <= CW'(2 * M - 1);
        busy <= 1'b1;
      end else if (busy) begin
        if (!a[0]) begin
          a  <= a >> 1;
          u  <= div_x(u);
          da <= da - 1;
        end else begin
          a <= (a ^ b) >> 1;
          u <= div_x(u ^ v);
          if (da < db) begin
            b  <= a;
            v  <= u;
            db <= da;
            da <= db - 1;
          end else begin
            da <= da - 1;
          end
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("gf2m_div_binary: start while busy");
endmodule
