// dfx_adder_ctrl - control block of the DFX adder.
//
// From the operand exponents it decides which operand, if any, is shifted
// up from the Num0 to the Num1 scale, and at which scale the sum emerges:
//   a_sel = ~a_exp &  b_exp   (A is Num0, B is Num1: shift A)
//   b_sel =  a_exp & ~b_exp   (B is Num0, A is Num1: shift B)
//   s_sel =  a_exp |  b_exp   (the sum is Num1-scaled unless both are Num0)
// These are the paper's equations. Combinational.
module dfx_adder_ctrl (
  input  logic a_exp,
  input  logic b_exp,
  output logic a_sel,
  output logic b_sel,
  output logic s_sel
);

  assign a_sel = ~a_exp &  b_exp;
  assign b_sel =  a_exp & ~b_exp;
  assign s_sel =  a_exp |  b_exp;

endmodule
