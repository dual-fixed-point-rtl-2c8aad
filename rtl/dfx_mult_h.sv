// dfx_mult_h - DFX-H multiplier: DFX operand times fixed-point operand.
//
// a is DFX N_P0_P1 and m a two's complement M.PM number, typically a filter
// coefficient. The significands need no alignment: X(a) * m is formed at
// full precision (N-1+M bits) and carries a's exponent as its scale, P0+PM
// or P1+PM. The rescaler turns it back into DFX N_P0_P1. This is the paper's
// structure. Product width: the paper gives n' = m+n-1 for the DFX product
// (m+n-2 significand bits); this design keeps one more bit, so that
// (most negative) x (most negative) is exact too. Combinational.
module dfx_mult_h #(
  parameter int N  = dfx_pkg::DFX_N,
  parameter int P0 = dfx_pkg::DFX_P0,
  parameter int P1 = dfx_pkg::DFX_P1,
  parameter int M  = dfx_pkg::COEF_M,
  parameter int PM = dfx_pkg::COEF_PM
) (
  input  logic [N-1:0] a,
  input  logic [M-1:0] m,
  output logic [N-1:0] q
);

  logic signed [N+M-2:0] p;

  assign p = (N+M-1)'($signed(a[N-2:0])) * (N+M-1)'($signed(m));

  dfx_mult_h_rescaler #(.N(N), .P0(P0), .P1(P1), .M(M), .PM(PM)) u_rescale (
    .p(p), .p_exp(a[N-1]), .q(q)
  );

endmodule
