// dfx_top - fixed-point notch filter computed in Dual Fixed-Point.
//
// in_fx, an N_FX-bit two's complement sample with P_FX fraction bits, is
// encoded into DFX N_P0_P1. It is filtered by the DFX Direct Form I notch
// filter, and the result is decoded back to N_FX.P_FX fixed point. The
// default 43.18 fixed-point format represents every DFX 32_18_6 value
// exactly. The DFX filter output is also available as out_dfx. Timing: one
// sample per clock when in_valid is high; out_fx/out_dfx are valid, with
// out_valid, one cycle later.
//
// Beside the filter, and independent of it, sits a combinational DFX-F
// multiplier (mf_a * mf_b -> mf_q), the full DFX x DFX operator. The filter
// itself uses only the DFX-H multiplier, because its coefficients are
// constants. Placing encoder and decoder at the filter's ports is this
// design's choice.
module dfx_top #(
  parameter int N    = dfx_pkg::DFX_N,
  parameter int P0   = dfx_pkg::DFX_P0,
  parameter int P1   = dfx_pkg::DFX_P1,
  parameter int M    = dfx_pkg::COEF_M,
  parameter int PM   = dfx_pkg::COEF_PM,
  parameter int N_FX = N - 1 + P0 - P1,
  parameter int P_FX = P0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [N_FX-1:0] in_fx,
  output logic            out_valid,
  output logic [N_FX-1:0] out_fx,
  output logic [N-1:0]    out_dfx,
  input  logic [N-1:0]    mf_a,
  input  logic [N-1:0]    mf_b,
  output logic [N-1:0]    mf_q
);

  logic [N-1:0] x_dfx;

  dfx_encoder #(.N(N), .P0(P0), .P1(P1), .N_IN(N_FX), .P_IN(P_FX)) u_enc (
    .d(in_fx), .q(x_dfx)
  );

  dfx_iir_filter #(.N(N), .P0(P0), .P1(P1), .M(M), .PM(PM)) u_iir (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x_dfx),
    .out_valid(out_valid), .y(out_dfx)
  );

  dfx_decoder #(.N(N), .P0(P0), .P1(P1), .N_OUT(N_FX), .P_OUT(P_FX)) u_dec (
    .d(out_dfx), .q(out_fx)
  );

  dfx_mult_f #(.N(N), .P0(P0), .P1(P1)) u_mult_f (
    .a(mf_a), .b(mf_b), .q(mf_q)
  );

endmodule
