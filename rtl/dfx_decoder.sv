// dfx_decoder - DFX to two's complement fixed-point.
//
// d = {E, X} is a DFX N_P0_P1 number. The output is X aligned from P0
// (E = 0) or P1 (E = 1) fraction bits to P_OUT fraction bits, in N_OUT bits:
// two constant shifts and a 2:1 multiplexer selected by E. With the default
// N_OUT.P_OUT = (N-1+P0-P1).P0 the conversion is exact. A narrower output
// truncates low bits and wraps high bits.
//
// The paper names the block and its function only; the structure is this
// design's own. Combinational.
module dfx_decoder #(
  parameter int N     = dfx_pkg::DFX_N,
  parameter int P0    = dfx_pkg::DFX_P0,
  parameter int P1    = dfx_pkg::DFX_P1,
  parameter int N_OUT = N - 1 + P0 - P1,
  parameter int P_OUT = P0
) (
  input  logic [N-1:0]     d,
  output logic [N_OUT-1:0] q
);

  logic [N_OUT-1:0] v0, v1;

  dfx_shift #(.W_IN(N-1), .W_OUT(N_OUT), .SHR(P0 - P_OUT)) u_from_num0 (
    .din(d[N-2:0]), .dout(v0)
  );
  dfx_shift #(.W_IN(N-1), .W_OUT(N_OUT), .SHR(P1 - P_OUT)) u_from_num1 (
    .din(d[N-2:0]), .dout(v1)
  );

  assign q = d[N-1] ? v1 : v0;

endmodule
