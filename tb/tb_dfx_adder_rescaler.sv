// tb_dfx_adder_rescaler - self-checking test of the adder's rescaler.
//
// Random N-bit sums at both scales, biased towards the magnitudes around the
// boundary B, plus the boundary values themselves. Each result is compared
// with the reference encode() of the sum at its scale. The test requires all
// three cases (no change, shift right, shift left) to occur.
module tb_dfx_adder_rescaler;
  import dfx_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_keep = 0, n_right = 0, n_left = 0;

  logic [31:0] sum, s;
  logic        s_sel;

  dfx_adder_rescaler u_dut (.sum(sum), .s_sel(s_sel), .s(s));

  task automatic apply(logic [31:0] v, logic sel);
    logic [63:0] e;
    int          sc;
    sum = v;
    s_sel = sel;
    #1;
    sc = sel ? 6 : 18;
    e = encode(fx_val(128'(v), 32), sc, 32, 18, 6);
    checks++;
    if (s !== e[31:0]) begin
      failures++;
      $display("FAIL sum=%h s_sel=%0b got %h exp %h", v, sel, s, e[31:0]);
    end
    if (!sel && s[31]) n_right++;
    else if (sel && !s[31]) n_left++;
    else n_keep++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Boundaries: Num0 sum: 2^30; Num1 sum: 2^(12+6) = 2^18.
    apply(32'h4000_0000, 0); apply(32'h3fff_ffff, 0); apply(32'hc000_0000, 0);
    apply(32'hbfff_ffff, 0);
    apply(32'h0004_0000, 1); apply(32'h0003_ffff, 1); apply(32'hfffc_0000, 1);
    apply(32'hfffb_ffff, 1);
    for (int i = 0; i < 4000; i++) begin
      logic signed [31:0] r;
      r = $urandom;
      r = r >>> $urandom_range(20, 0);
      apply(r, 1'($urandom));
    end
    checks++;
    if (n_keep == 0 || n_right == 0 || n_left == 0) begin
      failures++;
      $display("FAIL coverage keep=%0d right=%0d left=%0d", n_keep, n_right, n_left);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
