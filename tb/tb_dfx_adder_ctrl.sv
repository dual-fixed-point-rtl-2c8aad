// tb_dfx_adder_ctrl - exhaustive test of the DFX adder control block.
//
// All four exponent combinations: the Num0 operand, and only it, is shifted
// when the exponents differ, and the sum scale is Num1 unless both are Num0.
module tb_dfx_adder_ctrl;
  int checks = 0, failures = 0;
  logic a_exp, b_exp, a_sel, b_sel, s_sel;

  dfx_adder_ctrl u_dut (.*);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a_exp, b_exp} = 2'(i);
      #1;
      checks++;
      if (a_sel !== (a_exp == 0 && b_exp == 1) || b_sel !== (a_exp == 1 && b_exp == 0) ||
          s_sel !== (a_exp == 1 || b_exp == 1)) begin
        failures++;
        $display("FAIL a_exp=%0b b_exp=%0b -> %0b%0b%0b", a_exp, b_exp, a_sel, b_sel, s_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
