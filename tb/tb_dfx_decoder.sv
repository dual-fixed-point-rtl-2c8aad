// tb_dfx_decoder - self-checking test of the DFX to fixed-point decoder.
//
// The default decoder (DFX 32_18_6 -> 43.18) must be exact: its output is
// compared with X * 2^(18 - scale) computed arithmetically. A second
// instance decodes to a narrower 24.8 word (truncation and wrap), and is
// compared with the floored value taken modulo 2^24.
module tb_dfx_decoder;
  import dfx_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [31:0] d;
  logic [42:0] q_a;
  logic [23:0] q_b;

  dfx_decoder u_a (.d(d), .q(q_a));
  dfx_decoder #(.N(32), .P0(18), .P1(6), .N_OUT(24), .P_OUT(8)) u_b (.d(d), .q(q_b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      wide_t x, ea, eb;
      int    sc;
      d = $urandom;
      if (i < 4) d = {i[1], i[0] ? 31'h4000_0000 : 31'h3fff_ffff};
      #1;
      x  = sig_of(64'(d), 32);
      sc = scale_of(64'(d), 32, 18, 6);
      ea = scale_by(x, sc - 18);
      eb = scale_by(x, sc - 8);
      checks += 2;
      if (fx_val(128'(q_a), 43) !== ea) begin
        failures++;
        $display("FAIL a d=%h got %h", d, q_a);
      end
      if (q_b !== 24'(eb)) begin
        failures++;
        $display("FAIL b d=%h got %h exp %h", d, q_b, 24'(eb));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
