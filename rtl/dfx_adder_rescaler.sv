// dfx_adder_rescaler - converts the DFX adder's full-precision sum to DFX.
//
// sum is an N-bit two's complement number at scale P0 (s_sel = 0) or P1
// (s_sel = 1). Two range detectors look at it: det_n0 treats sum as a Num0
// number (P0 fraction bits), det_n1 as a Num1 number (P1 fraction bits).
// Each is 1 when the value is outside [-B, B). Then, as in the paper:
//   no_change = ~s_sel & ~det_n0 | s_sel & det_n1   sum mod 2^(N-1)
//   shift_r   = ~s_sel &  det_n0                    (sum >>> (P0-P1)) mod 2^(N-1)
//   shift_l   =  s_sel & ~det_n1                    (sum <<  (P0-P1)) mod 2^(N-1)
//   exponent  = ~s_sel &  det_n0 | s_sel & det_n1
// A right shift sign-extends and drops low bits; a left shift pads with
// zeros and is exact, because a Num1 sum inside [-B, B) fits Num0. A Num1
// sum beyond the Num1 range wraps. Combinational; s = {exponent, X}.
module dfx_adder_rescaler #(
  parameter int N  = dfx_pkg::DFX_N,
  parameter int P0 = dfx_pkg::DFX_P0,
  parameter int P1 = dfx_pkg::DFX_P1
) (
  input  logic [N-1:0] sum,
  input  logic         s_sel,
  output logic [N-1:0] s
);

  logic         det_n0, det_n1;
  logic         no_change, shift_r, shift_l, exp_bit;
  logic [N-2:0] x_keep, x_right, x_left;

  dfx_range_detector #(.N_IN(N), .P_IN(P0), .N(N), .P0(P0)) u_det_n0 (
    .d(sum), .e(det_n0)
  );
  dfx_range_detector #(.N_IN(N), .P_IN(P1), .N(N), .P0(P0)) u_det_n1 (
    .d(sum), .e(det_n1)
  );

  dfx_shift #(.W_IN(N), .W_OUT(N-1), .SHR(0)) u_keep (
    .din(sum), .dout(x_keep)
  );
  dfx_shift #(.W_IN(N), .W_OUT(N-1), .SHR(P0 - P1)) u_right (
    .din(sum), .dout(x_right)
  );
  dfx_shift #(.W_IN(N), .W_OUT(N-1), .SHR(-(P0 - P1))) u_left (
    .din(sum), .dout(x_left)
  );

  assign no_change = (~s_sel & ~det_n0) | (s_sel & det_n1);
  assign shift_r   = ~s_sel & det_n0;
  assign shift_l   =  s_sel & ~det_n1;
  assign exp_bit   = (~s_sel & det_n0) | (s_sel & det_n1);

  // Exactly one of the three selects is high.
  always_comb begin
    unique case (1'b1)
      shift_r: s = {exp_bit, x_right};
      shift_l: s = {exp_bit, x_left};
      default: s = {exp_bit, x_keep};
    endcase
  end

  always_comb begin
    assert ($onehot({no_change, shift_r, shift_l}))
      else $error("dfx_adder_rescaler: selects not one-hot");
  end

endmodule
