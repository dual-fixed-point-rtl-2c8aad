// dfx_pkg - shared constants of the Dual Fixed-Point (DFX) operators.
//
// A DFX number DFX n_p0_p1 is an n-bit word {E, X}: one exponent bit E above
// an (n-1)-bit two's complement significand X. Its value is X * 2^-p0 when
// E = 0 (range "Num0") and X * 2^-p1 when E = 1 (range "Num1"), with p0 > p1.
// The boundary between the ranges is B = 2^(n-p0-2), one step above the
// largest Num0 value, so the exponent can be found from the sign-extension
// bits of a number alone.
//
// The default format is DFX 32_18_6, the best-performing 32-bit filter
// configuration. The filter coefficient format (32.30) and the notch
// coefficients themselves are this design's own choice: a notch at 0.15 of
// the Nyquist frequency with its poles at radius 0.9.
package dfx_pkg;

  // Default DFX format n_p0_p1.
  localparam int DFX_N  = 32;
  localparam int DFX_P0 = 18;
  localparam int DFX_P1 = 6;

  // Default coefficient format m.pm of the DFX-H multiplier operand.
  localparam int COEF_M  = 32;
  localparam int COEF_PM = 30;

  // Notch coefficients, round(c * 2^30), w0 = 0.15*pi, r = 0.9:
  //   b0 = 1, b1 = -2cos(w0), b2 = 1, a1 = 2r cos(w0), a2 = -r^2.
  // The feedback products are added, so a1 and a2 carry their signs.
  localparam logic signed [31:0] NOTCH_B0 = 32'sd1073741824;
  localparam logic signed [31:0] NOTCH_B1 = -32'sd1913421941;
  localparam logic signed [31:0] NOTCH_B2 = 32'sd1073741824;
  localparam logic signed [31:0] NOTCH_A1 = 32'sd1722079747;
  localparam logic signed [31:0] NOTCH_A2 = -32'sd869730877;

endpackage
