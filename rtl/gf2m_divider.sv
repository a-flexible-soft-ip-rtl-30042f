// GF(2^m) inversion/division operator: z = g / h mod f(x).
//
// Two architectures are available and one is built, chosen when the design
// is elaborated. The binary algorithm (gf2m_div_binary) is small and takes
// 2m cycles. The Itoh-Tsujii architecture (gf2m_div_iti) needs a multiplier
// but, with a fast one, far fewer cycles. As in the document, the choice
// follows from the multiplier's digit size W: Itoh-Tsujii is used when m-1
// squarings plus its chain multiplications take no more than 2m cycles,
// otherwise the binary algorithm (ARCH = 0). ARCH = 1 forces the binary
// algorithm and ARCH = 2 Itoh-Tsujii; that override is this design's own.
//
// Interface and timing: start / busy / done as in the two architectures;
// the quotient is on z while done is high and holds until the next start.
module gf2m_divider #(
  parameter int unsigned M    = 163,
  parameter int unsigned W    = 82,
  parameter int unsigned ARCH = 0
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
  localparam bit ITI = (ARCH == 2) || (ARCH == 0 && ecc_pkg::use_itoh_tsujii(M, W));

  if (ITI) begin : g_iti
    gf2m_div_iti #(.M(M), .W(W)) u_div (.clk, .rst_n, .start, .g, .h, .busy, .done, .z);
  end else begin : g_bin
    gf2m_div_binary #(.M(M)) u_div (.clk, .rst_n, .start, .g, .h, .busy, .done, .z);
  end
endmodule
