// tb_dfx_encoder - self-checking test of the fixed-point to DFX encoder.
//
// Default instance (43.18 -> DFX 32_18_6) and one with a coarser input
// (40.4 -> DFX 32_9_6, so both ranges need left and right alignment). Random
// inputs of random magnitude and the boundary values are compared with the
// reference encode(). The test also requires both exponents to occur,
// and checks that the default encoder followed by the ideal value reproduces
// the input to within one Num1 step.
module tb_dfx_encoder;
  import dfx_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_e0 = 0, n_e1 = 0;

  logic [42:0] d_a;
  logic [39:0] d_b;
  logic [31:0] q_a, q_b;

  dfx_encoder u_a (.d(d_a), .q(q_a));
  dfx_encoder #(.N(32), .P0(9), .P1(6), .N_IN(40), .P_IN(4)) u_b (.d(d_b), .q(q_b));

  task automatic apply(wide_t v);
    logic [63:0] ea, eb;
    real         err;
    d_a = 43'(v);
    d_b = 40'(v >>> 3);
    #1;
    ea = encode(fx_val(128'(d_a), 43), 18, 32, 18, 6);
    eb = encode(fx_val(128'(d_b), 40), 4, 32, 9, 6);
    checks += 3;
    if (q_a !== ea[31:0]) begin
      failures++;
      $display("FAIL a d=%h got %h exp %h", d_a, q_a, ea[31:0]);
    end
    if (q_b !== eb[31:0]) begin
      failures++;
      $display("FAIL b d=%h got %h exp %h", d_b, q_b, eb[31:0]);
    end
    // Value check, independent of the encode() model.
    err = to_real(64'(q_a), 32, 18, 6) - real'(fx_val(128'(d_a), 43)) / (2.0 ** 18);
    if (err > 0.0 || err <= -(2.0 ** -6)) begin
      failures++;
      $display("FAIL value d=%h err=%g", d_a, err);
    end
    if (q_a[31]) n_e1++; else n_e0++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t b;
    b = wide_t'(1) <<< 30;  // B = 2^12 at 18 fraction bits
    apply(b); apply(b - 1); apply(-b); apply(-b - 1); apply(0); apply(-1);
    for (int i = 0; i < 4000; i++) begin
      wide_t r;
      r = wide_t'({$urandom, $urandom, $urandom, $urandom});
      r = r >>> $urandom_range(127, 86);
      apply(r);
    end
    checks++;
    if (n_e0 == 0 || n_e1 == 0) begin
      failures++;
      $display("FAIL coverage e0=%0d e1=%0d", n_e0, n_e1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
