// GF(2^m) divider built on Itoh-Tsujii inversion: z = g * h^(-1) mod f(x).
//
// The inverse is h^(2^m - 2) = (h^(2^(m-1) - 1))^2. Writing
// beta_k = h^(2^k - 1), the chain beta_2k = (beta_k)^(2^k) * beta_k and
// beta_(k+1) = (beta_k)^2 * h walks through the bits of m-1 from the top,
// reaching beta_(m-1) with m-2 squarings and floor(log2(m-1)) +
// popcount(m-1) - 1 multiplications (9 for K-163). One more squaring gives
// the inverse, and a final multiplication by g turns it into the quotient.
// Squarings take one cycle each on a single combinational squarer; the
// multiplications use one gf2m_multiplier with digit size W. The
// multiplier's result is squared in the cycle it arrives, so no cycle is
// lost between steps.
//
// Interface and timing: pulse start with g and h valid (h must not be 0).
// done is high for one cycle, with the quotient on z, after
// (M-1) + (N+1)*ceil(M/W) + 2 cycles, N being the chain length above
// (184 cycles for M = 163, W = 82). busy is high in between. The document
// counts the inversion alone as (m-1) squarings plus N multiplications
// (180 cycles for the same case); the final multiplication and two cycles of
// handshake are this design's.
module gf2m_div_iti #(
  parameter int unsigned M = 163,
  parameter int unsigned W = 82
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
  localparam int unsigned E  = M - 1;                 // exponent of the chain
  localparam int unsigned T  = ecc_pkg::flog2(E);     // index of E's top bit
  localparam int unsigned KW = $clog2(M + 1);
  localparam int unsigned IW = (T > 1) ? $clog2(T) : 1;
  localparam logic [31:0] EB = 32'(E);

  typedef enum logic [1:0] {S_IDLE, S_SQ, S_MST, S_MUL} state_t;
  typedef enum logic [1:0] {PH_DBL, PH_INC, PH_FIN} phase_t;

  state_t        state;
  phase_t        phase, nphase;
  logic [M-1:0]  beta, tq, h_r, g_r;
  logic [KW-1:0] k, nk, rem, nn;
  logic [IW-1:0] bi, nbi;
  logic [M-1:0]  sq_in, sq_out;
  logic          m_start, m_busy, m_done;
  logic [M-1:0]  m_b, m_c;

  gf2m_squarer #(.M(M)) u_sq (.a(sq_in), .c(sq_out));

  gf2m_multiplier #(.M(M), .W(W)) u_mul (
    .clk, .rst_n, .start(m_start), .a(tq), .b(m_b),
    .busy(m_busy), .done(m_done), .c(m_c)
  );

  assign sq_in   = (state == S_MUL) ? m_c : tq;
  assign m_start = (state == S_MST);
  assign m_b     = (phase == PH_DBL) ? beta : (phase == PH_INC) ? h_r : g_r;

  // Phase that follows the multiplication of the current phase, with the
  // updated k and the number of squarings it needs.
  always_comb begin
    nk     = (phase == PH_DBL) ? KW'(k << 1) : (phase == PH_INC) ? k + 1'b1 : k;
    nbi    = bi;
    nphase = PH_FIN;
    if (phase == PH_DBL && EB[5'(bi)]) begin
      nphase = PH_INC;
    end else if (bi != '0) begin
      nphase = PH_DBL;
      nbi    = bi - 1'b1;
    end
    nn = (nphase == PH_DBL) ? nk : KW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= PH_FIN;
      beta  <= '0;
      tq    <= '0;
      h_r   <= '0;
      g_r   <= '0;
      k     <= '0;
      rem   <= '0;
      bi    <= '0;
      z     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          beta  <= h;
          tq    <= h;
          h_r   <= h;
          g_r   <= g;
          k     <= KW'(1);
          rem   <= KW'(1);
          bi    <= IW'((T > 0) ? T - 1 : 0);
          phase <= (T > 0) ? PH_DBL : PH_FIN;
          state <= S_SQ;
        end
        S_SQ: begin
          tq  <= sq_out;
          rem <= rem - 1'b1;
          if (rem == KW'(1)) state <= S_MST;
        end
        S_MST: state <= S_MUL;
        S_MUL: if (m_done) begin
          if (phase == PH_FIN) begin
            z     <= m_c;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            beta  <= m_c;
            k     <= nk;
            bi    <= nbi;
            phase <= nphase;
            tq    <= sq_out;           // first squaring of the next phase
            rem   <= nn - 1'b1;
            state <= (nn == KW'(1)) ? S_MST : S_SQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("gf2m_div_iti: start while busy");
  a_mul_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n) m_start |-> !m_busy)
    else $error("gf2m_div_iti: multiplier started while busy");
endmodule
