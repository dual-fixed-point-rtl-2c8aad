// tb_dfx_iir_filter - self-checking test of the DFX notch filter.
//
// Runs two filters side by side on the same stimulus: DFX 32_18_6 (the
// default) and DFX 32_9_6. Both are the 32-bit DFX configurations of the
// filter evaluation. The input mimics that evaluation's data set: most
// samples have magnitudes between 2^-12 and 2^-3, and about one in seven
// lies between 2^-3 and 2^20. Every output is compared bit for bit with a
// model built from the reference operators. in_valid has random gaps,
// and the output must appear exactly one cycle after its input. A reset in the
// middle must clear the state. The test also reports the output SNR and the
// mean relative error of each format against a double-precision filter.
module tb_dfx_iir_filter;
  import dfx_ref_pkg::*;

  localparam int NS = 3000;
  localparam longint C_B0 = 1073741824, C_B1 = -1913421941, C_B2 = 1073741824;
  localparam longint C_A1 = 1722079747, C_A2 = -869730877;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [31:0] x1, x2, y1, y2;
  logic        v1, v2;

  dfx_iir_filter u_d1 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x1),
                       .out_valid(v1), .y(y1));
  dfx_iir_filter #(.N(32), .P0(9), .P1(6)) u_d2 (.clk(clk), .rst_n(rst_n),
                       .in_valid(in_valid), .x(x2), .out_valid(v2), .y(y2));

  always #5 clk = ~clk;

  // Bit-accurate model state per format, and double-precision reference.
  typedef struct {
    logic [63:0] xd1, xd2, yd1, yd2;
  } st_t;
  st_t  st[2];
  real  rx1, rx2, ry1, ry2;
  real  sig_pow = 0.0, err_pow[2] = '{0.0, 0.0}, rel_sum[2] = '{0.0, 0.0};
  int   n_out = 0;

  function automatic logic [63:0] model_step(ref st_t s, input logic [63:0] x,
                                             input int p0);
    logic [63:0] mb0, mb1, mb2, ma1, ma2, s12, sf, sb, y;
    ev_t         ev;
    mb0 = mul_h(x,     64'(C_B0), 32, p0, 6, 32, 30, ev);
    mb1 = mul_h(s.xd1, 64'(C_B1), 32, p0, 6, 32, 30, ev);
    mb2 = mul_h(s.xd2, 64'(C_B2), 32, p0, 6, 32, 30, ev);
    ma1 = mul_h(s.yd1, 64'(C_A1), 32, p0, 6, 32, 30, ev);
    ma2 = mul_h(s.yd2, 64'(C_A2), 32, p0, 6, 32, 30, ev);
    s12 = add(mb1, mb2, 32, p0, 6, ev);
    sf  = add(mb0, s12, 32, p0, 6, ev);
    sb  = add(ma1, ma2, 32, p0, 6, ev);
    y   = add(sf, sb, 32, p0, 6, ev);
    s.xd2 = s.xd1; s.xd1 = x; s.yd2 = s.yd1; s.yd1 = y;
    return y;
  endfunction

  function automatic real gen_sample();
    real mag;
    if ($urandom_range(6, 0) == 0) mag = 2.0 ** ((real'($urandom_range(23000, 0)) / 1000.0) - 3.0);
    else                           mag = 2.0 ** ((real'($urandom_range(9000, 0)) / 1000.0) - 12.0);
    return ($urandom_range(1, 0) != 0) ? -mag : mag;
  endfunction

  initial begin
    #(NS * 40 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp1, exp2;
    real         xr, yr, d;
    st[0] = '{default: '0};
    st[1] = '{default: '0};
    rx1 = 0; rx2 = 0; ry1 = 0; ry2 = 0;
    x1 = '0; x2 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < NS; k++) begin
      // Mid-run reset: state must return to zero.
      if (k == NS / 2) begin
        #1 rst_n = 0;
        #1 rst_n = 1;
        st[0] = '{default: '0};
        st[1] = '{default: '0};
        rx1 = 0; rx2 = 0; ry1 = 0; ry2 = 0;
        checks += 2;
        if (y1 !== '0 || v1 !== 1'b0) begin
          failures++;
          $display("FAIL reset did not clear output");
        end
        if (u_d1.y1 !== '0 || u_d1.x1 !== '0) begin
          failures++;
          $display("FAIL reset did not clear state");
        end
      end
      // Random idle cycles: output must hold.
      if ($urandom_range(3, 0) == 0) begin
        in_valid = 0;
        @(posedge clk); #1;
        checks++;
        if (v1 !== 1'b0) begin failures++; $display("FAIL out_valid without input"); end
      end
      xr = gen_sample();
      x1 = encode(wide_t'(xr * (2.0 ** 30)), 30, 32, 18, 6);
      x2 = encode(wide_t'(xr * (2.0 ** 30)), 30, 32, 9, 6);
      in_valid = 1;
      exp1 = model_step(st[0], 64'(x1), 18);
      exp2 = model_step(st[1], 64'(x2), 9);
      xr = to_real(64'(x1), 32, 18, 6);
      yr = 1.0 * xr + (-1.7820130483767358) * rx1 + 1.0 * rx2
           + 1.6038117435390622 * ry1 + (-0.81) * ry2;
      rx2 = rx1; rx1 = xr; ry2 = ry1; ry1 = yr;
      @(posedge clk); #1;
      in_valid = 0;
      checks += 2;
      if (v1 !== 1'b1 || y1 !== exp1[31:0]) begin
        failures++;
        $display("FAIL d1 k=%0d v=%0b y=%h exp %h", k, v1, y1, exp1[31:0]);
      end
      if (v2 !== 1'b1 || y2 !== exp2[31:0]) begin
        failures++;
        $display("FAIL d2 k=%0d v=%0b y=%h exp %h", k, v2, y2, exp2[31:0]);
      end
      sig_pow += yr * yr;
      d = to_real(64'(y1), 32, 18, 6) - yr;
      err_pow[0] += d * d;
      if (yr != 0.0) rel_sum[0] += (d < 0 ? -d : d) / (yr < 0 ? -yr : yr);
      d = to_real(64'(y2), 32, 9, 6) - yr;
      err_pow[1] += d * d;
      if (yr != 0.0) rel_sum[1] += (d < 0 ? -d : d) / (yr < 0 ? -yr : yr);
      n_out++;
    end
    $display("32_18_6: SNR %0.1f dB, mean relative error %0.1f dB",
             10.0 * $log10(sig_pow / err_pow[0]), 20.0 * $log10(rel_sum[0] / n_out));
    $display("32_9_6 : SNR %0.1f dB, mean relative error %0.1f dB",
             10.0 * $log10(sig_pow / err_pow[1]), 20.0 * $log10(rel_sum[1] / n_out));
    // The finer Num0 format must track small signals better.
    checks++;
    if (rel_sum[0] >= rel_sum[1]) begin
      failures++;
      $display("FAIL 32_18_6 not more accurate than 32_9_6");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
