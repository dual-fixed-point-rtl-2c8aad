// dfx_mult_f - DFX-F multiplier: product of two DFX N_P0_P1 numbers.
//
// The paper gives this block's function but not its circuit. This design
// builds it in the simplest way. The 2(N-1)-bit significand product is
// at scale 2*P0, P0+P1 or 2*P1, depending on the exponents. It is shifted
// left by 0, P0-P1 or 2(P0-P1) bits to the common scale 2*P0, without loss,
// and that fixed-point number passes through the DFX encoder. The result
// therefore truncates and wraps exactly as the other operators do.
// Combinational.
module dfx_mult_f #(
  parameter int N  = dfx_pkg::DFX_N,
  parameter int P0 = dfx_pkg::DFX_P0,
  parameter int P1 = dfx_pkg::DFX_P1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] q
);

  localparam int DP = P0 - P1;
  localparam int WP = 2 * (N - 1);
  localparam int WF = WP + 2 * DP;

  logic signed [WP-1:0] p;
  logic signed [WF-1:0] p_ext, p_al;

  assign p     = WP'($signed(a[N-2:0])) * WP'($signed(b[N-2:0]));
  assign p_ext = WF'(p);

  always_comb begin
    unique case ({a[N-1], b[N-1]})
      2'b00:        p_al = p_ext;
      2'b01, 2'b10: p_al = p_ext <<< DP;
      default:      p_al = p_ext <<< (2 * DP);
    endcase
  end

  dfx_encoder #(.N(N), .P0(P0), .P1(P1), .N_IN(WF), .P_IN(2 * P0)) u_enc (
    .d(p_al), .q(q)
  );

endmodule
