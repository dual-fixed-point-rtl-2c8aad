// dfx_encoder - two's complement fixed-point to DFX.
//
// d is an N_IN-bit fixed-point number with P_IN fraction bits. A range
// detector picks the exponent: E = 0 when -B <= d < B, B = 2^(N-P0-2). The
// significand is d re-aligned to P0 (E = 0) or P1 (E = 1) fraction bits and
// cut to N-1 bits. Both alignments are constant shifts, so the encoder is
// one detector and one 2:1 multiplexer. q = {E, X}.
//
// The paper names the block and its function only. The structure, the
// truncation of dropped low bits, and the wrap-around of values beyond the
// Num1 range are this design's choices, made to match the paper's
// operators. The defaults (43.18 in) hold every DFX 32_18_6 value exactly.
// Combinational.
module dfx_encoder #(
  parameter int N    = dfx_pkg::DFX_N,
  parameter int P0   = dfx_pkg::DFX_P0,
  parameter int P1   = dfx_pkg::DFX_P1,
  parameter int N_IN = N - 1 + P0 - P1,
  parameter int P_IN = P0
) (
  input  logic [N_IN-1:0] d,
  output logic [N-1:0]    q
);

  logic          e;
  logic [N-2:0]  x0, x1;

  dfx_range_detector #(.N_IN(N_IN), .P_IN(P_IN), .N(N), .P0(P0)) u_det (
    .d(d), .e(e)
  );

  dfx_shift #(.W_IN(N_IN), .W_OUT(N-1), .SHR(P_IN - P0)) u_to_num0 (
    .din(d), .dout(x0)
  );
  dfx_shift #(.W_IN(N_IN), .W_OUT(N-1), .SHR(P_IN - P1)) u_to_num1 (
    .din(d), .dout(x1)
  );

  assign q = {e, e ? x1 : x0};

endmodule
