// tb_dfx_adder - self-checking test of the DFX adder.
//
// Four instances: DFX 32_18_6 (default) and DFX 32_9_6, the two filter
// formats, plus 32_30_0 and 32_16_4, the widest-range formats considered. Random operands of
// random exponent and magnitude are compared with the reference add(), which
// aligns the Num0 operand by flooring and encodes the exact sum. Where the
// sum stays inside the Num1 range, the result must also be within two Num1
// steps of the real sum. Required coverage: mixed exponents, a Num0 sum
// overflowing into Num1, and a Num1 sum falling back into Num0.
module tb_dfx_adder;
  import dfx_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_mixed = 0, n_up = 0, n_down = 0;

  logic [31:0] a, b, s1, s2, s3, s4;

  dfx_adder u_d1 (.a(a), .b(b), .s(s1));
  dfx_adder #(.N(32), .P0(9), .P1(6)) u_d2 (.a(a), .b(b), .s(s2));
  dfx_adder #(.N(32), .P0(30), .P1(0)) u_d3 (.a(a), .b(b), .s(s3));
  dfx_adder #(.N(32), .P0(16), .P1(4)) u_d4 (.a(a), .b(b), .s(s4));

  function automatic logic [31:0] rand_dfx();
    logic signed [30:0] x;
    x = 31'($urandom);
    x = x >>> $urandom_range(30, 0);
    return {1'($urandom), x};
  endfunction

  task automatic check_fmt(logic [31:0] got, int p0, int p1, string name);
    logic [63:0] e;
    ev_t         ev;
    real         exact, err;
    e = add(64'(a), 64'(b), 32, p0, p1, ev);
    checks++;
    if (got !== e[31:0]) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h exp %h", name, a, b, got, e[31:0]);
    end
    exact = to_real(64'(a), 32, p0, p1) + to_real(64'(b), 32, p0, p1);
    if (exact < 2.0 ** (32 - p1 - 2) && exact >= -(2.0 ** (32 - p1 - 2))) begin
      err = to_real(64'(got), 32, p0, p1) - exact;
      checks++;
      if (err > 0.0 || err <= -2.0 * (2.0 ** -p1)) begin
        failures++;
        $display("FAIL %s value a=%h b=%h err=%g", name, a, b, err);
      end
    end
    if (p0 == 18) begin
      n_mixed += int'(ev.mixed);
      n_up    += int'(ev.up);
      n_down  += int'(ev.down);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Num0 + Num0 just crossing B, and Num1 - Num1 falling below B.
    a = 32'h3fff_ffff; b = 32'h0000_0001; #1; check_fmt(s1, 18, 6, "d1");
    a = 32'h8004_0000; b = 32'hfffc_0001; #1; check_fmt(s1, 18, 6, "d1");
    for (int i = 0; i < 5000; i++) begin
      a = rand_dfx();
      b = rand_dfx();
      #1;
      check_fmt(s1, 18, 6, "d1");
      check_fmt(s2, 9, 6, "d2");
      check_fmt(s3, 30, 0, "d3");
      check_fmt(s4, 16, 4, "d4");
    end
    checks++;
    if (n_mixed == 0 || n_up == 0 || n_down == 0) begin
      failures++;
      $display("FAIL coverage mixed=%0d up=%0d down=%0d", n_mixed, n_up, n_down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
