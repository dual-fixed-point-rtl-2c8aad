// tb_dfx_top - end-to-end test of the fixed-point DFX notch filter.
//
// Runs the top at its default parameters (DFX 32_18_6, 43.18 fixed-point
// ports, 32.30 coefficients). Fixed-point samples shaped like a
// wide-dynamic-range data set (mostly 2^-12..2^-3, about one in seven
// between 2^-3 and 2^20) go in with random idle cycles. Each output, fixed
// point and DFX, is compared bit for bit, one cycle after its input, with a
// model built from the reference operators: encode, four adds and five
// DFX-H products per sample, decode. The output must also stay close to a
// double-precision filter. Meanwhile the DFX-F multiplier port is driven with
// random operands and checked against the reference product.
//
// Mechanisms counted; each must occur at least once:
//   encoder Num0 / Num1 results, decoder Num0 / Num1 inputs,
//   adds with mixed exponents, adds overflowing Num0 into Num1,
//   adds falling from Num1 back into Num0, products moving Num0 -> Num1 and
//   Num1 -> Num0, idle cycles (state held), a mid-run reset, DFX-F products
//   for all four exponent combinations.
module tb_dfx_top;
  import dfx_ref_pkg::*;

  localparam int NS = 4000;
  localparam longint C_B0 = 1073741824, C_B1 = -1913421941, C_B2 = 1073741824;
  localparam longint C_A1 = 1722079747, C_A2 = -869730877;

  int checks = 0, failures = 0;
  int n_enc0 = 0, n_enc1 = 0, n_dec0 = 0, n_dec1 = 0;
  int n_mixed = 0, n_add_up = 0, n_add_down = 0, n_mul_up = 0, n_mul_down = 0;
  int n_idle = 0, n_reset = 0;
  int n_mf[4] = '{0, 0, 0, 0};

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [42:0] in_fx, out_fx;
  logic [31:0] out_dfx, mf_a, mf_b, mf_q;
  logic        out_valid;

  dfx_top u_dut (.*);

  always #5 clk = ~clk;

  logic [63:0] xd1, xd2, yd1, yd2;
  real         rx1, rx2, ry1, ry2, max_err;

  function automatic void count_add(ev_t ev);
    n_mixed    += int'(ev.mixed);
    n_add_up   += int'(ev.up);
    n_add_down += int'(ev.down);
  endfunction

  function automatic void count_mul(ev_t ev);
    n_mul_up   += int'(ev.up);
    n_mul_down += int'(ev.down);
  endfunction

  function automatic logic [63:0] model_step(input logic [63:0] x);
    logic [63:0] mb0, mb1, mb2, ma1, ma2, s12, sf, sb, y;
    ev_t         ev;
    mb0 = mul_h(x,   64'(C_B0), 32, 18, 6, 32, 30, ev); count_mul(ev);
    mb1 = mul_h(xd1, 64'(C_B1), 32, 18, 6, 32, 30, ev); count_mul(ev);
    mb2 = mul_h(xd2, 64'(C_B2), 32, 18, 6, 32, 30, ev); count_mul(ev);
    ma1 = mul_h(yd1, 64'(C_A1), 32, 18, 6, 32, 30, ev); count_mul(ev);
    ma2 = mul_h(yd2, 64'(C_A2), 32, 18, 6, 32, 30, ev); count_mul(ev);
    s12 = add(mb1, mb2, 32, 18, 6, ev); count_add(ev);
    sf  = add(mb0, s12, 32, 18, 6, ev); count_add(ev);
    sb  = add(ma1, ma2, 32, 18, 6, ev); count_add(ev);
    y   = add(sf, sb, 32, 18, 6, ev);   count_add(ev);
    xd2 = xd1; xd1 = x; yd2 = yd1; yd1 = y;
    return y;
  endfunction

  function automatic real gen_sample();
    real mag;
    if ($urandom_range(6, 0) == 0) mag = 2.0 ** ((real'($urandom_range(23000, 0)) / 1000.0) - 3.0);
    else                           mag = 2.0 ** ((real'($urandom_range(9000, 0)) / 1000.0) - 12.0);
    return ($urandom_range(1, 0) != 0) ? -mag : mag;
  endfunction

  function automatic logic [31:0] rand_dfx();
    logic signed [30:0] x;
    x = 31'($urandom);
    x = x >>> $urandom_range(30, 0);
    return {1'($urandom), x};
  endfunction

  task automatic clear_model();
    xd1 = '0; xd2 = '0; yd1 = '0; yd2 = '0;
    rx1 = 0; rx2 = 0; ry1 = 0; ry2 = 0;
  endtask

  initial begin
    #(NS * 40 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] xdfx, ydfx, mfe;
    wide_t       xi, yfx;
    real         xr, yr, err, tol;
    clear_model();
    max_err = 0.0;
    in_fx = '0; mf_a = '0; mf_b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < NS; k++) begin
      if (k == NS / 2) begin
        #1 rst_n = 0;
        #1 rst_n = 1;
        clear_model();
        n_reset++;
        checks++;
        if (out_fx !== '0 || out_valid !== 1'b0) begin
          failures++;
          $display("FAIL reset did not clear the output");
        end
      end
      if ($urandom_range(3, 0) == 0) begin
        logic [42:0] held;
        held = out_fx;
        in_valid = 0;
        in_fx = 43'($urandom);
        @(posedge clk); #1;
        n_idle++;
        checks++;
        if (out_valid !== 1'b0 || out_fx !== held) begin
          failures++;
          $display("FAIL idle cycle changed the output");
        end
      end
      // New sample.
      xr = gen_sample();
      xi = wide_t'(xr * (2.0 ** 18));
      in_fx = 43'(xi);
      in_valid = 1;
      xdfx = encode(xi, 18, 32, 18, 6);
      if (xdfx[31]) n_enc1++; else n_enc0++;
      ydfx = model_step(xdfx);
      if (ydfx[31]) n_dec1++; else n_dec0++;
      yfx = scale_by(sig_of(ydfx, 32), scale_of(ydfx, 32, 18, 6) - 18);
      // Double-precision filter on the real input.
      xr = real'(xi) / (2.0 ** 18);
      yr = xr - 1.7820130483767358 * rx1 + rx2 + 1.6038117435390622 * ry1 - 0.81 * ry2;
      rx2 = rx1; rx1 = xr; ry2 = ry1; ry1 = yr;
      // DFX-F operands for this cycle.
      mf_a = rand_dfx();
      mf_b = rand_dfx();
      @(posedge clk); #1;
      in_valid = 0;
      checks += 3;
      if (out_valid !== 1'b1 || out_dfx !== ydfx[31:0]) begin
        failures++;
        $display("FAIL k=%0d out_valid=%0b out_dfx=%h exp %h", k, out_valid, out_dfx, ydfx[31:0]);
      end
      if (fx_val(128'(out_fx), 43) !== yfx) begin
        failures++;
        $display("FAIL k=%0d out_fx=%h", k, out_fx);
      end
      // Accuracy against double precision. Each sample truncates nine
      // times by at most one Num1 step (2^-6), and the recursive part
      // amplifies such errors by its noise gain (sum of |h| < 20 for poles
      // at radius 0.9, about 14.6): 9 * 2^-6 * 20 < 3.
      err = real'(fx_val(128'(out_fx), 43)) / (2.0 ** 18) - yr;
      if (err < 0) err = -err;
      if (err > max_err) max_err = err;
      tol = 3.0;
      if (err > tol) begin
        failures++;
        $display("FAIL k=%0d accuracy err=%g y=%g", k, err, yr);
      end
      mfe = mul_f(64'(mf_a), 64'(mf_b), 32, 18, 6);
      if (mf_q !== mfe[31:0]) begin
        failures++;
        $display("FAIL dfx-f a=%h b=%h got %h exp %h", mf_a, mf_b, mf_q, mfe[31:0]);
      end
      n_mf[{mf_a[31], mf_b[31]}]++;
    end
    $display("max abs error vs double: %g", max_err);
    $display("encoder E0=%0d E1=%0d decoder E0=%0d E1=%0d", n_enc0, n_enc1, n_dec0, n_dec1);
    $display("add mixed=%0d up=%0d down=%0d  mul up=%0d down=%0d", n_mixed, n_add_up,
             n_add_down, n_mul_up, n_mul_down);
    $display("idle=%0d reset=%0d dfx-f combos=%p", n_idle, n_reset, n_mf);
    checks++;
    if (n_enc0 == 0 || n_enc1 == 0 || n_dec0 == 0 || n_dec1 == 0 || n_mixed == 0 ||
        n_add_up == 0 || n_add_down == 0 || n_mul_up == 0 || n_mul_down == 0 ||
        n_idle == 0 || n_reset == 0 || n_mf[0] == 0 || n_mf[1] == 0 || n_mf[2] == 0 ||
        n_mf[3] == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
