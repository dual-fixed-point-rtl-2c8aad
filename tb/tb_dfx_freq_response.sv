// tb_dfx_freq_response - frequency response of the DFX notch filter.
//
// Drives the top (default DFX 32_18_6, 43.18 fixed-point ports) with a
// sinusoid at each of several normalised frequencies (fraction of Nyquist),
// including the notch at 0.15. The amplitude is 2^14, so every period
// crosses the Num0/Num1 boundary B = 2^12 and the operators switch range
// continually. After a 400-sample settling time it measures the following.
//   * Gain: the output amplitude over the next 400 samples, from a
//     least-squares fit of a sine and a cosine at the input frequency,
//     divided by the input amplitude. It must match the analytic |H(e^jw)|
//     of the notch to 0.1%, and be below 2^-10 at the notch itself.
//   * Error: the DFX output minus a double-precision filter fed the same
//     samples, relative to the Num1 full scale 2^24. It is printed in dB
//     for each frequency, and must stay below -100 dB.
// Between frequencies the top is reset.
module tb_dfx_freq_response;
  import dfx_ref_pkg::*;

  localparam int  NSETTLE = 400;
  localparam int  NMEAS   = 400;
  localparam real PI      = 3.14159265358979323846;
  localparam real W0      = 0.15 * PI;
  localparam real R       = 0.9;
  localparam real AMP     = 16384.0;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [42:0] in_fx, out_fx;
  logic [31:0] out_dfx, mf_a, mf_b, mf_q;
  logic        out_valid;

  dfx_top u_dut (.*);

  always #5 clk = ~clk;

  real freqs[10] = '{0.02, 0.05, 0.10, 0.14, 0.15, 0.16, 0.20, 0.30, 0.40, 0.49};

  function automatic real h_mag(real w);
    real nr, ni, dr, di, a1, a2;
    a1 = 2.0 * R * $cos(W0);
    a2 = -R * R;
    nr = 1.0 - 2.0 * $cos(W0) * $cos(w) + $cos(2.0 * w);
    ni = 2.0 * $cos(W0) * $sin(w) - $sin(2.0 * w);
    dr = 1.0 - a1 * $cos(w) - a2 * $cos(2.0 * w);
    di = a1 * $sin(w) + a2 * $sin(2.0 * w);
    return $sqrt((nr * nr + ni * ni) / (dr * dr + di * di));
  endfunction

  initial begin
    #((NSETTLE + NMEAS + 10) * 10 * 12);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mf_a = '0; mf_b = '0; in_fx = '0;
    foreach (freqs[fi]) begin
      real   w, rx1, rx2, ry1, ry2, xr, yr, ydut, err, max_err, gain, want;
      real   sn, cs, sss, scc, ssc, sys, syc, det, fa, fb;
      wide_t xi;
      w = freqs[fi] * PI;
      rx1 = 0; rx2 = 0; ry1 = 0; ry2 = 0; max_err = 0;
      sss = 0; scc = 0; ssc = 0; sys = 0; syc = 0;
      rst_n = 0;
      @(posedge clk); #1 rst_n = 1;
      for (int k = 0; k < NSETTLE + NMEAS; k++) begin
        xi = wide_t'(AMP * $sin(w * k) * (2.0 ** 18));
        in_fx = 43'(xi);
        in_valid = 1;
        xr = real'(xi) / (2.0 ** 18);
        yr = xr - 2.0 * $cos(W0) * rx1 + rx2 + 2.0 * R * $cos(W0) * ry1 - R * R * ry2;
        rx2 = rx1; rx1 = xr; ry2 = ry1; ry1 = yr;
        @(posedge clk); #1;
        ydut = real'(fx_val(128'(out_fx), 43)) / (2.0 ** 18);
        err = ydut - yr;
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        if (k >= NSETTLE) begin
          sn = $sin(w * k); cs = $cos(w * k);
          sss += sn * sn; scc += cs * cs; ssc += sn * cs;
          sys += ydut * sn; syc += ydut * cs;
        end
      end
      in_valid = 0;
      det  = sss * scc - ssc * ssc;
      fa   = (sys * scc - syc * ssc) / det;
      fb   = (syc * sss - sys * ssc) / det;
      gain = $sqrt(fa * fa + fb * fb) / AMP;
      want = h_mag(w);
      $display("f=%0.2f  gain %0.5f (analytic %0.5f)  error re full scale %0.1f dB",
               freqs[fi], gain, want, 20.0 * $log10((max_err + 1e-30) / (2.0 ** 24)));
      checks += 2;
      if (want < 0.01) begin
        if (gain > 2.0 ** -10) begin
          failures++;
          $display("FAIL notch not deep enough at f=%0.2f", freqs[fi]);
        end
      end else if (gain > want * 1.001 || gain < want * 0.999) begin
        failures++;
        $display("FAIL gain at f=%0.2f", freqs[fi]);
      end
      if (max_err / (2.0 ** 24) > 1e-5) begin
        failures++;
        $display("FAIL error at f=%0.2f", freqs[fi]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
