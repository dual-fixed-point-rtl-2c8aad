// dfx_mult_h_rescaler - converts a DFX-H product back to DFX N_P0_P1.
//
// p is the full product of a DFX significand and an M.PM fixed-point
// operand: N-1+M bits at scale P0+PM when the DFX operand was Num0
// (p_exp = 0) and at P1+PM when it was Num1 (p_exp = 1). Two range
// detectors, aligned to those two scales, give the candidate exponent, and
// p_exp picks one. Three constant shifts form the candidate significands:
//   >> PM            (Num0 from Num0, or Num1 from Num1)
//   >> PM-(P0-P1)    (Num0 from a Num1-scaled product)
//   >> PM+(P0-P1)    (Num1 from a Num0-scaled product)
// each mod 2^(N-1). Two multiplexers on p_exp give the (N-1)_P0 and (N-1)_P1
// versions, and the detected exponent selects between them. This is the
// paper's structure. Right shifts truncate; a Num1 result beyond the
// Num1 range wraps. Combinational.
module dfx_mult_h_rescaler #(
  parameter int N  = dfx_pkg::DFX_N,
  parameter int P0 = dfx_pkg::DFX_P0,
  parameter int P1 = dfx_pkg::DFX_P1,
  parameter int M  = dfx_pkg::COEF_M,
  parameter int PM = dfx_pkg::COEF_PM
) (
  input  logic [N+M-2:0] p,
  input  logic           p_exp,
  output logic [N-1:0]   q
);

  localparam int WP = N - 1 + M;
  localparam int DP = P0 - P1;

  logic         det_p0, det_p1, e;
  logic [N-2:0] x_same, x_up, x_down, x_num0, x_num1;

  dfx_range_detector #(.N_IN(WP), .P_IN(P0 + PM), .N(N), .P0(P0)) u_det_p0 (
    .d(p), .e(det_p0)
  );
  dfx_range_detector #(.N_IN(WP), .P_IN(P1 + PM), .N(N), .P0(P0)) u_det_p1 (
    .d(p), .e(det_p1)
  );

  dfx_shift #(.W_IN(WP), .W_OUT(N-1), .SHR(PM)) u_same (
    .din(p), .dout(x_same)
  );
  dfx_shift #(.W_IN(WP), .W_OUT(N-1), .SHR(PM - DP)) u_up (
    .din(p), .dout(x_up)
  );
  dfx_shift #(.W_IN(WP), .W_OUT(N-1), .SHR(PM + DP)) u_down (
    .din(p), .dout(x_down)
  );

  assign e      = p_exp ? det_p1 : det_p0;
  assign x_num0 = p_exp ? x_up   : x_same;
  assign x_num1 = p_exp ? x_same : x_down;
  assign q      = {e, e ? x_num1 : x_num0};

endmodule
