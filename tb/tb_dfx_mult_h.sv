// tb_dfx_mult_h - self-checking test of the DFX-H multiplier.
//
// Instance 1: DFX 32_18_6 times a 32.30 operand (the filter's format).
// Instance 2: DFX 32_18_6 times a 16.4 operand, where PM < P0-P1 turns one
// of the rescaler's right shifts into a left shift. Results are compared
// with the reference mul_h(). For instance 1 they must also lie within one
// Num1 step of the real product when it stays in range. Both range changes
// (Num0 operand to Num1 result and back) must occur.
module tb_dfx_mult_h;
  import dfx_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0;

  logic [31:0] a, q1, q2;
  logic [31:0] m1;
  logic [15:0] m2;

  dfx_mult_h u_d1 (.a(a), .m(m1), .q(q1));
  dfx_mult_h #(.N(32), .P0(18), .P1(6), .M(16), .PM(4)) u_d2 (.a(a), .m(m2), .q(q2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic signed [30:0] x;
      logic [63:0]        e1, e2;
      ev_t                ev;
      real                exact, err;
      x  = 31'($urandom);
      x  = x >>> $urandom_range(30, 0);
      a  = {1'($urandom), x};
      m1 = $urandom;
      m1 = 32'($signed(m1) >>> $urandom_range(31, 0));
      m2 = 16'($urandom);
      if (i == 0) begin a = 32'h4000_0000; m1 = 32'h8000_0000; end
      #1;
      e1 = mul_h(64'(a), 64'(m1), 32, 18, 6, 32, 30, ev);
      n_up   += int'(ev.up);
      n_down += int'(ev.down);
      e2 = mul_h(64'(a), 64'(m2), 32, 18, 6, 16, 4, ev);
      checks += 2;
      if (q1 !== e1[31:0]) begin
        failures++;
        $display("FAIL d1 a=%h m=%h got %h exp %h", a, m1, q1, e1[31:0]);
      end
      if (q2 !== e2[31:0]) begin
        failures++;
        $display("FAIL d2 a=%h m=%h got %h exp %h", a, m2, q2, e2[31:0]);
      end
      exact = to_real(64'(a), 32, 18, 6) * real'($signed(m1)) / (2.0 ** 30);
      if (exact < 2.0 ** 24 && exact >= -(2.0 ** 24)) begin
        err = to_real(64'(q1), 32, 18, 6) - exact;
        checks++;
        if (err > 0.0 || err <= -(2.0 ** -6)) begin
          failures++;
          $display("FAIL value a=%h m=%h err=%g", a, m1, err);
        end
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0) begin
      failures++;
      $display("FAIL coverage up=%0d down=%0d", n_up, n_down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
