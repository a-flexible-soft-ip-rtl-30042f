// Interleaved GF(2^m) multiplier with a configurable digit size:
// c = a * b mod f(x).
//
// The shift-and-add method walks through b from its most significant bit:
// each step multiplies the accumulator by x, reduces it at once (one
// conditional XOR of f when bit m-1 falls out) and adds a when the current
// bit of b is 1. W such steps are chained combinationally, so a
// multiplication takes ceil(M/W) clock cycles: M cycles for W = 1 and 2
// cycles for W = ceil(M/2), as in the document. b is padded with zeros on its
// high side to a whole number of digits; those leading zero bits leave the
// accumulator at zero.
//
// Interface and timing: pulse start for one cycle with a and b valid. busy
// is high while the multiplication runs, and done is high for one cycle,
// ceil(M/W) cycles after the start cycle, with the product on c. c holds
// until the next start. A start while busy is a protocol error (asserted).
// The start/busy/done handshake is this design's own choice.
module gf2m_multiplier #(
  parameter int unsigned M = 163,
  parameter int unsigned W = 82
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);
  localparam int unsigned NC = ecc_pkg::mult_cycles(M, W);
  localparam int unsigned BW = NC * W;
  localparam logic [M-1:0] FLOW = ecc_pkg::poly_low(M)[M-1:0];
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1;

  logic [M-1:0]  a_r;
  logic [BW-1:0] b_r;
  logic [CW-1:0] cnt;
  logic [BW-1:0] b_ext;

  assign b_ext = BW'(b);

  if (W < 1 || W > M) begin : g_bad_w
    $error("gf2m_multiplier: W must lie between 1 and M");
  end

  // W interleaved steps: acc = acc*x mod f + digit_bit*a, MSB first.
  function automatic logic [M-1:0] digit_step(logic [M-1:0] acc, logic [M-1:0] op,
                                              logic [W-1:0] digit);
    for (int i = W - 1; i >= 0; i--) begin
      acc = acc[M-1] ? ((acc << 1) ^ FLOW) : (acc << 1);
      if (digit[i]) acc = acc ^ op;
    end
    return acc;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r  <= '0;
      b_r  <= '0;
      c    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_r  <= a;
        b_r  <= b_ext << W;
        c    <= digit_step('0, a, b_ext[BW-1 -: W]);
        cnt  <= CW'(NC - 1);
        busy <= (NC > 1);
        done <= (NC == 1);
      end else if (busy) begin
        c   <= digit_step(c, a_r, b_r[BW-1 -: W]);
        b_r <= b_r << W;
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("gf2m_multiplier: start while busy");
endmodule
