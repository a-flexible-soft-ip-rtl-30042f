// Key generation unit: public key Q = d * P.
//
// One point multiplier computes Q from the private key d (a tau-adic digit
// string, see ecc_point_mult) and the curve's generator point P. When the
// multiplication finishes the public key is copied into an output register
// and key_valid is raised; the key stays there, and valid, until the next
// start, so the encrypter can take it while the multiplier is reused. The
// output register and key_valid are this design's own.
//
// Interface and timing: pulse start with d and P valid. done is high for
// one cycle when (qx, qy, q_inf) holds the new key, one point
// multiplication plus one cycle after start.
module ecc_keygen #(
  parameter int unsigned M    = 163,
  parameter int unsigned W    = 82,
  parameter int unsigned ARCH = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] d,
  input  logic [M-1:0] px,
  input  logic [M-1:0] py,
  output logic         busy,
  output logic         done,
  output logic         key_valid,
  output logic [M-1:0] qx,
  output logic [M-1:0] qy,
  output logic         q_inf
);
  logic         pm_done;
  logic [M-1:0] pm_x, pm_y;
  logic         pm_inf;

  ecc_point_mult #(.M(M), .W(W), .ARCH(ARCH)) u_pm (
    .clk, .rst_n, .start, .k(d), .px, .py, .p_inf(1'b0),
    .busy, .done(pm_done), .qx(pm_x), .qy(pm_y), .q_inf(pm_inf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qx        <= '0;
      qy        <= '0;
      q_inf     <= 1'b1;
      key_valid <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= pm_done;
      if (start) key_valid <= 1'b0;
      if (pm_done) begin
        qx        <= pm_x;
        qy        <= pm_y;
        q_inf     <= pm_inf;
        key_valid <= 1'b1;
      end
    end
  end
endmodule
