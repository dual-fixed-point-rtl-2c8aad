// tb_dfx_mult_f - self-checking test of the DFX-F (DFX x DFX) multiplier.
//
// Three instances: DFX 32_18_6, DFX 32_9_6 and DFX 32_30_0. Random operands with all four
// exponent combinations are compared with the reference mul_f(). For the
// default format the result must also lie within one Num1 step of the
// real product when it stays in range.
module tb_dfx_mult_f;
  import dfx_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_comb[4] = '{0, 0, 0, 0};

  logic [31:0] a, b, q1, q2, q3;

  dfx_mult_f u_d1 (.a(a), .b(b), .q(q1));
  dfx_mult_f #(.N(32), .P0(9), .P1(6)) u_d2 (.a(a), .b(b), .q(q2));
  dfx_mult_f #(.N(32), .P0(30), .P1(0)) u_d3 (.a(a), .b(b), .q(q3));

  function automatic logic [31:0] rand_dfx();
    logic signed [30:0] x;
    x = 31'($urandom);
    x = x >>> $urandom_range(30, 0);
    return {1'($urandom), x};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [63:0] e1, e2, e3;
      real         exact, err;
      a = rand_dfx();
      b = rand_dfx();
      #1;
      e1 = mul_f(64'(a), 64'(b), 32, 18, 6);
      e2 = mul_f(64'(a), 64'(b), 32, 9, 6);
      e3 = mul_f(64'(a), 64'(b), 32, 30, 0);
      checks += 3;
      if (q3 !== e3[31:0]) begin
        failures++;
        $display("FAIL d3 a=%h b=%h got %h exp %h", a, b, q3, e3[31:0]);
      end
      if (q1 !== e1[31:0]) begin
        failures++;
        $display("FAIL d1 a=%h b=%h got %h exp %h", a, b, q1, e1[31:0]);
      end
      if (q2 !== e2[31:0]) begin
        failures++;
        $display("FAIL d2 a=%h b=%h got %h exp %h", a, b, q2, e2[31:0]);
      end
      exact = to_real(64'(a), 32, 18, 6) * to_real(64'(b), 32, 18, 6);
      if (exact < 2.0 ** 24 && exact >= -(2.0 ** 24)) begin
        err = to_real(64'(q1), 32, 18, 6) - exact;
        checks++;
        if (err > 0.0 || err <= -(2.0 ** -6)) begin
          failures++;
          $display("FAIL value a=%h b=%h err=%g", a, b, err);
        end
      end
      n_comb[{a[31], b[31]}]++;
    end
    checks++;
    if (n_comb[0] == 0 || n_comb[1] == 0 || n_comb[2] == 0 || n_comb[3] == 0) begin
      failures++;
      $display("FAIL coverage %p", n_comb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
