// dfx_adder - adds two DFX N_P0_P1 numbers.
//
// The control block compares the exponents. When they differ, the Num0
// operand's significand is shifted right by P0-P1 (sign-extending, low bits
// dropped) so that both sit at the Num1 scale. The shift amount is fixed,
// so a 2:1 multiplexer replaces a floating-point adder's barrel shifter. The
// two (N-1)-bit significands are added at full precision into N bits. The
// rescaler then chooses the output range from that sum, at scale P1 if
// either operand was Num1 and P0 otherwise. This is the paper's structure.
// Combinational; a and b in, s out in the same cycle.
module dfx_adder #(
  parameter int N  = dfx_pkg::DFX_N,
  parameter int P0 = dfx_pkg::DFX_P0,
  parameter int P1 = dfx_pkg::DFX_P1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);

  logic                a_sel, b_sel, s_sel;
  logic signed [N-2:0] a_sig, b_sig, a_shr, b_shr, a_al, b_al;
  logic signed [N-1:0] sum;

  dfx_adder_ctrl u_ctrl (
    .a_exp(a[N-1]), .b_exp(b[N-1]),
    .a_sel(a_sel), .b_sel(b_sel), .s_sel(s_sel)
  );

  assign a_sig = a[N-2:0];
  assign b_sig = b[N-2:0];
  assign a_shr = a_sig >>> (P0 - P1);
  assign b_shr = b_sig >>> (P0 - P1);
  assign a_al  = a_sel ? a_shr : a_sig;
  assign b_al  = b_sel ? b_shr : b_sig;
  assign sum   = N'(a_al) + N'(b_al);

  dfx_adder_rescaler #(.N(N), .P0(P0), .P1(P1)) u_rescale (
    .sum(sum), .s_sel(s_sel), .s(s)
  );

endmodule
