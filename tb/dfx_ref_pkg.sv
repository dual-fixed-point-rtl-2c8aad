// dfx_ref_pkg - arithmetic reference model of DFX numbers for the testbenches.
//
// Works on numbers, not circuits. A value is held as a wide integer v
// together with its scale s (value = v * 2^-s). encode() applies the DFX
// definition: the exponent is 0 exactly when -B <= value < B with
// B = 2^(n-p0-2). The significand is the value floored to p0 or p1 fraction
// bits and kept modulo 2^(n-1). The operator models (add, mul_h, mul_f) give
// the result every DFX operator must produce under that rule, and also report which
// range transitions occurred so that testbenches can count them.
package dfx_ref_pkg;

  typedef logic signed [127:0] wide_t;

  // v * 2^-sh, floored (sh > 0) or exact (sh <= 0).
  function automatic wide_t scale_by(wide_t v, int sh);
    if (sh >= 0) return v >>> sh;
    else         return v <<< (-sh);
  endfunction

  // Is value v*2^-s inside [-B, B), B = 2^(n-p0-2)?
  function automatic bit in_num0(wide_t v, int s, int n, int p0);
    int    e2;
    wide_t lim;
    e2 = n - p0 - 2 + s;
    if (e2 < 0) return (v == 0);
    lim = wide_t'(1) <<< e2;
    return (v >= -lim) && (v < lim);
  endfunction

  // DFX word {E, X} (in the low n bits) of value v*2^-s.
  function automatic logic [63:0] encode(wide_t v, int s, int n, int p0, int p1);
    wide_t       x;
    logic [63:0] r;
    bit          e;
    e = !in_num0(v, s, n, p0);
    x = scale_by(v, e ? (s - p1) : (s - p0));
    r = 64'(x) & ((64'd1 << (n - 1)) - 64'd1);
    r[n-1] = e;
    return r;
  endfunction

  function automatic bit exp_of(logic [63:0] d, int n);
    return d[n-1];
  endfunction

  // Sign-extended significand.
  function automatic wide_t sig_of(logic [63:0] d, int n);
    wide_t x;
    x = wide_t'(d) & ((wide_t'(1) <<< (n - 1)) - 1);
    if (d[n-2]) x = x - (wide_t'(1) <<< (n - 1));
    return x;
  endfunction

  function automatic int scale_of(logic [63:0] d, int n, int p0, int p1);
    return exp_of(d, n) ? p1 : p0;
  endfunction

  function automatic real to_real(logic [63:0] d, int n, int p0, int p1);
    return real'(sig_of(d, n)) / (2.0 ** scale_of(d, n, p0, p1));
  endfunction

  // Two's complement fixed-point word of w bits to wide integer.
  function automatic wide_t fx_val(logic [127:0] d, int w);
    wide_t x;
    x = wide_t'(d) & ((wide_t'(1) <<< w) - 1);
    if (d[w-1]) x = x - (wide_t'(1) <<< w);
    return x;
  endfunction

  // Result kinds an operator can hit, for coverage counting.
  typedef struct packed {
    bit mixed;    // operand exponents differ (one is aligned)
    bit up;       // result Num1 from a Num0-scaled intermediate
    bit down;     // result Num0 from a Num1-scaled intermediate
  } ev_t;

  // DFX addition: align the Num0 operand (floored) when exponents differ,
  // add exactly, encode.
  function automatic logic [63:0] add(logic [63:0] a, logic [63:0] b,
                                      int n, int p0, int p1, output ev_t ev);
    wide_t       xa, xb;
    int          s;
    logic [63:0] r;
    xa = sig_of(a, n);
    xb = sig_of(b, n);
    ev = '0;
    if (exp_of(a, n) == exp_of(b, n)) begin
      s = exp_of(a, n) ? p1 : p0;
    end else begin
      ev.mixed = 1;
      s = p1;
      if (!exp_of(a, n)) xa = scale_by(xa, p0 - p1);
      else               xb = scale_by(xb, p0 - p1);
    end
    r = encode(xa + xb, s, n, p0, p1);
    ev.up   = (s == p0) && exp_of(r, n);
    ev.down = (s == p1) && !exp_of(r, n);
    return r;
  endfunction

  // DFX x fixed-point (m bits, pm fraction bits).
  function automatic logic [63:0] mul_h(logic [63:0] a, logic [63:0] m, int n,
                                        int p0, int p1, int mw, int pm, output ev_t ev);
    wide_t       prod;
    int          s;
    logic [63:0] r;
    prod = sig_of(a, n) * fx_val(128'(m), mw);
    s = scale_of(a, n, p0, p1) + pm;
    r = encode(prod, s, n, p0, p1);
    ev = '0;
    ev.up   = !exp_of(a, n) && exp_of(r, n);
    ev.down = exp_of(a, n) && !exp_of(r, n);
    return r;
  endfunction

  // DFX x DFX.
  function automatic logic [63:0] mul_f(logic [63:0] a, logic [63:0] b, int n,
                                        int p0, int p1);
    return encode(sig_of(a, n) * sig_of(b, n),
                  scale_of(a, n, p0, p1) + scale_of(b, n, p0, p1), n, p0, p1);
  endfunction

endpackage
