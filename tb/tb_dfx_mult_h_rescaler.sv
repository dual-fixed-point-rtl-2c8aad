// tb_dfx_mult_h_rescaler - self-checking test of the DFX-H product rescaler.
//
// Random 62-bit products (DFX 32_18_6 times a 32.30 operand) at both scales
// P0+PM and P1+PM, biased around the boundary, are compared with the
// reference encode(). All four range cases must occur: Num0 to Num0,
// Num0 to Num1, Num1 to Num1 and Num1 to Num0.
module tb_dfx_mult_h_rescaler;
  import dfx_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_case[4] = '{0, 0, 0, 0};

  logic [62:0] p;
  logic        p_exp;
  logic [31:0] q;

  dfx_mult_h_rescaler u_dut (.p(p), .p_exp(p_exp), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic signed [62:0] r;
      logic [63:0]        e;
      r = 63'({$urandom, $urandom});
      r = r >>> $urandom_range(50, 0);
      p = r;
      p_exp = 1'($urandom);
      #1;
      e = encode(fx_val(128'(p), 63), p_exp ? 36 : 48, 32, 18, 6);
      checks++;
      if (q !== e[31:0]) begin
        failures++;
        $display("FAIL p=%h p_exp=%0b got %h exp %h", p, p_exp, q, e[31:0]);
      end
      n_case[{p_exp, q[31]}]++;
    end
    checks++;
    if (n_case[0] == 0 || n_case[1] == 0 || n_case[2] == 0 || n_case[3] == 0) begin
      failures++;
      $display("FAIL coverage %p", n_case);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
