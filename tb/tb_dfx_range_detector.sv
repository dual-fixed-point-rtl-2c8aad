// tb_dfx_range_detector - self-checking test of the DFX range detector.
//
// Five detectors with different input formats (boundary inside the word,
// boundary at the top bits, boundary above the MSB, boundary below the LSB)
// see random inputs of random magnitude plus the values on either side of
// +B and -B. Each exponent bit is compared with the definition
// -B <= d < B evaluated arithmetically by the reference package.
module tb_dfx_range_detector;
  import dfx_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [127:0] stim;
  logic e_a, e_b, e_c, e_d, e_e;

  // N_IN, P_IN, N, P0 per instance.
  dfx_range_detector #(.N_IN(32), .P_IN(18), .N(32), .P0(18)) u_a (.d(stim[31:0]), .e(e_a));
  dfx_range_detector #(.N_IN(43), .P_IN(18), .N(32), .P0(18)) u_b (.d(stim[42:0]), .e(e_b));
  dfx_range_detector #(.N_IN(63), .P_IN(36), .N(32), .P0(9))  u_c (.d(stim[62:0]), .e(e_c));
  dfx_range_detector #(.N_IN(10), .P_IN(0),  .N(32), .P0(18)) u_d (.d(stim[9:0]),  .e(e_d));
  dfx_range_detector #(.N_IN(16), .P_IN(0),  .N(32), .P0(31)) u_e (.d(stim[15:0]), .e(e_e));

  task automatic check_one(string name, bit got, int w, int p_in, int n, int p0);
    bit exp_e;
    exp_e = !in_num0(fx_val(stim, w), p_in, n, p0);
    checks++;
    if (got !== exp_e) begin
      failures++;
      $display("FAIL %s d=%h got %0b expected %0b", name, stim, got, exp_e);
    end
  endtask

  task automatic apply(logic [127:0] v);
    stim = v;
    #1;
    check_one("a", e_a, 32, 18, 32, 18);
    check_one("b", e_b, 43, 18, 32, 18);
    check_one("c", e_c, 63, 36, 32, 9);
    check_one("d", e_d, 10, 0, 32, 18);
    check_one("e", e_e, 16, 0, 32, 31);
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
    // Boundaries of instance a/b: B = 2^12 at 18 fraction bits -> 2^30.
    b = wide_t'(1) <<< 30;
    apply(128'(b)); apply(128'(b - 1)); apply(128'(-b)); apply(128'(-b - 1));
    // Instance c: B = 2^(32-9-2) = 2^21 at 36 fraction bits -> 2^57.
    b = wide_t'(1) <<< 57;
    apply(128'(b)); apply(128'(b - 1)); apply(128'(-b)); apply(128'(-b - 1));
    apply('0); apply('1);
    for (int i = 0; i < 4000; i++) begin
      wide_t r;
      r = wide_t'({$urandom, $urandom, $urandom, $urandom});
      r = r >>> ($urandom_range(127, 50));
      apply(128'(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
