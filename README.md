# Dual Fixed-Point (DFX) arithmetic and a DFX notch filter

Fixed-point arithmetic is small and fast, but a signal with a wide dynamic range forces a very wide
word. Floating point covers the range, but every adder needs barrel shifters and a normaliser.
Dual Fixed-Point sits in between. A DFX word has **one exponent bit**, which picks one of two fixed
radix-point positions for the significand. Both scalings are known at design time, so all
re-alignment is wiring plus a 2:1 multiplexer, never a variable shift.

This RTL implements the DFX operators: a range detector, an encoder and decoder, an adder, a
DFX x fixed-point ("DFX-H") multiplier and a DFX x DFX ("DFX-F") multiplier. They are combined into
a second-order Direct Form I notch filter with fixed-point ports. The number system and the
operator structures follow the published DFX proposal: C. T. Ewe, P. Y. K. Cheung and
G. A. Constantinides, *Dual Fixed-Point: An Efficient Alternative to Floating-Point Computation*.
Where that description stops, the choices made here are listed under
[What is this design's own](#what-is-this-designs-own).

## The number format

A DFX `n_p0_p1` number is an n-bit word `{E, X}`:

```
 bit n-1     bits n-2 .. 0
+--------+----------------------------------+
|   E    |  X: (n-1)-bit two's complement   |
+--------+----------------------------------+

value = X * 2^-p0   if E = 0   ("Num0": fine steps, small range)
value = X * 2^-p1   if E = 1   ("Num1": coarse steps, large range),   p0 > p1
```

The exponent is not free to choose. A value is Num0 exactly when it lies in `[-B, B)`, with

```
B = 2^(n-p0-2)
```

B is the first value above the largest Num0 number. The default format is **DFX 32_18_6**:

| range | step  | magnitude covered |
|-------|-------|-------------------|
| Num0  | 2^-18 | below 2^12        |
| Num1  | 2^-6  | up to 2^24        |

A Num1 word whose value happens to lie inside `[-B, B)` is still a legal operand. All operators
accept it, but they never produce one.

### Why the boundary makes range detection free

Because B is a power of two aligned to the Num0 window, no comparator is needed. Take a
fixed-point number with `p_in` fraction bits. It is inside `[-B, B)` exactly when all of its bits
from the MSB down to bit `p_in + n - p0 - 2` are equal. That lowest bit is where the sign bit of
an (n-1)-bit Num0 significand would sit. Those bits must be pure sign extension:

```
E = NOT(all ones) AND NOT(all zeros)      over d[MSB : p_in+n-p0-2]
```

This is `dfx_range_detector`. Every other operator uses it, instantiated with whatever
`p_in` its intermediate result has.

## Operators

All operators are combinational. Results are **truncated** (floored) when low bits are dropped.
They **wrap** (modulo 2^(n-1)) when a result exceeds the Num1 range; there is no saturation.

### Encoder and decoder (`dfx_encoder`, `dfx_decoder`)

The encoder takes an `N_IN.P_IN` fixed-point number and does three things:

* A range detector gives E.
* The input is re-aligned by wiring to P0 or to P1 fraction bits.
* A multiplexer selects one of the two, cut to n-1 bits.

The decoder does the reverse: it re-aligns X from P0 or P1 to `P_OUT` fraction bits, selected by E.

The default fixed-point side is `(N-1+P0-P1).P0`, which is 43.18 for 32_18_6. That width holds
every DFX value exactly, so decoding is lossless. Encoding is lossless for Num0 values and
truncates to 2^-6 for Num1 values.

### Adder (`dfx_adder` = `dfx_adder_ctrl` + alignment + `dfx_adder_rescaler`)

The adder works in three stages: align, add, rescale.

1. **Align.** The control block computes three signals:
   * `a_sel = ~Ae & Be`
   * `b_sel = Ae & ~Be`
   * `s_sel = Ae | Be`

   If the exponents differ, the Num0 operand is shifted right by `p0-p1`. The shift is arithmetic
   and drops the low bits. Both operands are then at the Num1 scale.
2. **Add.** Two (n-1)-bit significands are added into an n-bit sum at full precision. The sum's
   scale is P1 when `s_sel` is 1, P0 otherwise.
3. **Rescale.** Two range detectors examine the sum. `det_n0` treats it as having P0 fraction
   bits, `det_n1` as having P1. The rescaler then chooses one of three cases:

| case        | condition                        | significand                  | E |
|-------------|----------------------------------|------------------------------|---|
| `no_change` | `~s_sel & ~det_n0` or `s_sel & det_n1` | `sum mod 2^(n-1)`      | `s_sel` |
| `shift_r`   | `~s_sel & det_n0` (Num0 sum overflowed into Num1) | `(sum >>> (p0-p1)) mod 2^(n-1)` | 1 |
| `shift_l`   | `s_sel & ~det_n1` (Num1 sum fell back into Num0)  | `(sum << (p0-p1)) mod 2^(n-1)`  | 0 |

The left shift is exact: a Num1 sum inside `[-B, B)` always fits the Num0 window. An assertion
checks that exactly one case is selected.

The operation is therefore: align by flooring, add exactly, then encode the sum by the range rule.
One consequence is that adding a Num0 number to a Num1 number loses the Num0 operand's bits below
2^-p1, even when the result lands back in Num0.

### DFX-H multiplier (`dfx_mult_h` + `dfx_mult_h_rescaler`)

The DFX-H multiplier forms `A * M`, where A is DFX and M is an `M.PM` fixed-point operand, such
as a filter coefficient. The significands need no alignment. The product P = X * M is formed at
full width and keeps A's exponent as its scale: `P0+PM` if A was Num0, `P1+PM` if Num1. The
rescaler then converts P back to DFX:

* Two range detectors are aligned to the two possible scales, and A's exponent picks one. The
  result is the new E.
* Three constant shifts form the candidate significands:
  * `>> PM` keeps the range.
  * `>> PM-(P0-P1)` takes a Num1-scaled product to Num0.
  * `>> PM+(P0-P1)` takes a Num0-scaled product to Num1.
* Two multiplexers on A's exponent form the Num0 and the Num1 candidates. The new E selects
  between them.

If `PM < P0-P1`, the middle shift becomes a left shift.

The product is kept at `N-1+M` bits. That is one bit more than strictly needed for all but the
(most negative) x (most negative) case. With a constant M, synthesis folds the multiplier. In the
default notch filter, b0 = b2 = 1.0, so those two products reduce to wiring.

### DFX-F multiplier (`dfx_mult_f`)

The DFX-F multiplier is the full DFX x DFX product. The published proposal gives only its
function, so the structure here is the simplest one that works:

1. The 2(n-1)-bit significand product is at scale 2p0, p0+p1 or 2p1.
2. It is shifted left, without loss, to the common scale 2p0.
3. The result goes through `dfx_encoder`.

This block is not used by the filter. It appears in the top as a separate combinational port.

## The notch filter (`dfx_iir_filter`)

The filter is a second-order Direct Form I section. The additions follow the order of its
signal-flow graph:

```
y[k] = ( b0*x[k] + (b1*x[k-1] + b2*x[k-2]) ) + ( a1*y[k-1] + a2*y[k-2] )
```

It is built from:

* five `dfx_mult_h` with constant coefficients;
* four `dfx_adder`;
* four DFX delay registers.

The feedback products are *added*, so the coefficients a1 and a2 carry their signs.

The default coefficients put a notch at 0.15 of the Nyquist frequency (w0 = 0.15*pi). They are
stored in 32.30 fixed point:

| coefficient | formula      | value      | 32.30 integer |
|-------------|--------------|------------|---------------|
| b0          | 1            | 1.0        | 1073741824    |
| b1          | -2cos(w0)    | -1.7820130 | -1913421941   |
| b2          | 1            | 1.0        | 1073741824    |
| a1          | 2r cos(w0)   | 1.6038117  | 1722079747    |
| a2          | -r^2         | -0.81      | -869730877    |

Here r = 0.9 is the pole radius. The constants live in `dfx_pkg`. The peak gain is about 1.06,
and the sum of |h| of the recursive part is about 14.6.

**Timing.** The filter takes one sample per clock while `in_valid` is high. The whole arithmetic
path, five multipliers and up to three adder levels, is combinational. The output is registered:
`out_valid` equals `in_valid` delayed by one cycle, and `y` holds between samples. The reset is
asynchronous and active low. It clears the delay line and the output to DFX zero.

## Top level (`dfx_top`)

```
in_fx (43.18) --> dfx_encoder --> dfx_iir_filter --> out_dfx (DFX 32_18_6)
                                                  \-> dfx_decoder --> out_fx (43.18)
mf_a, mf_b (DFX) --> dfx_mult_f --> mf_q (DFX)        [independent, combinational]
```

Parameters: `N, P0, P1` (DFX format, default 32/18/6), `M, PM` (coefficient format, 32/30), and
`N_FX, P_FX` (fixed-point ports, default `N-1+P0-P1` / `P0`). Other DFX formats are set through
`P0`/`P1`. For example, `P0=9` gives DFX 32_9_6, which the filter testbench also runs.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. The testbenches compare against
`tb/dfx_ref_pkg.sv`, a reference written on numbers rather than circuits. It holds a value as a
wide integer plus a scale, and it encodes by the range rule directly. The operator testbenches
run thousands of random operands of random magnitude, plus the values on either side of ±B. They
require every range transition to occur: Num0→Num1 and Num1→Num0, in the adder and in the
multiplier. They also check the real-valued error bound: at most two Num1 steps for an add, one
for a product. The adder also runs in 32_9_6, 32_30_0 and 32_16_4, and the DFX-F
multiplier in 32_9_6 and 32_30_0. This exercises the parameterisation at its extremes.

`tb_dfx_top` runs the whole design at its default parameters for 4000 samples. Its input is
shaped like a wide-dynamic-range data set: most magnitudes lie between 2^-12 and 2^-3, and about
one in seven lies between 2^-3 and 2^20. The test includes random idle cycles and a reset in the
middle of the run. Each output, DFX and fixed point, must match the reference model bit for bit
exactly one cycle after its input. It must also stay within the truncation-noise bound of a
double-precision filter; the observed maximum error was about 0.27. The DFX-F port is checked at
the same time.

On this stimulus, `tb_dfx_iir_filter` measured the two formats against double precision:

| format  | output SNR | mean relative error |
|---------|-----------|---------------------|
| 32_18_6 | ~119 dB   | ~-82 dB             |
| 32_9_6  | ~135 dB   | ~-47 dB             |

`tb_dfx_freq_response` drives the whole design with sinusoids of amplitude 2^14, so each period
crosses the range boundary. It uses ten frequencies from 0.02 to 0.49 of Nyquist, including the
notch. A least-squares fit of the output amplitude matches the analytic notch response to 0.1%.
The gain at 0.15 is below 2^-10. The deviation from a double-precision filter stays near
-158 dB of the 2^24 full scale at every frequency, the notch included.

The finer Num0 format tracks the many small samples far better. The coarser one has slightly
better SNR, because SNR is dominated by the large samples. These figures depend on the assumed
coefficients and stimulus.

The RTL has not been synthesised to an FPGA, so no area or timing figures are claimed.

## What is this design's own

The published description fixes the format, the range rule, and the structure of the range
detector, adder, adder rescaler, DFX-H multiplier and filter. The following were chosen here:

* **Filter coefficients.** Only "notch at 0.15 of Nyquist" is given. The pole radius 0.9 and the
  32.30 format are assumptions.
* **Clocking.** The source quotes only combinational delays. The one-sample-per-cycle handshake,
  the registered output and the reset are this design's own.
* **Encoder, decoder and DFX-F insides.** The source gives only their function. Their fixed-point
  widths (43.18) and the DFX-F structure were chosen here.
* **Rounding.** Truncation everywhere; wrap instead of saturation beyond the Num1 range.
* **Product width.** The DFX-H product keeps one bit more than the minimum.
* **Range detector corners.** If the boundary lies above the input's MSB, E is always 0. If it
  lies below the LSB, E = (d != 0).

Lint reports unused bits inside `dfx_range_detector`, which reads only the bits above the
boundary, and inside `dfx_shift`, whose wide intermediate is cut to the output width. Both are
inherent to the constant-shift design.

## Simulating

The package files must come first. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/dfx_pkg.sv tb/dfx_ref_pkg.sv tb/tb_dfx_top.sv --top-module tb_dfx_top
./obj_dir/Vtb_dfx_top
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. The testbenches are:

| testbench | unit under test |
|-----------|-----------------|
| `tb_dfx_range_detector` | range detector |
| `tb_dfx_encoder` | encoder |
| `tb_dfx_decoder` | decoder |
| `tb_dfx_adder_ctrl` | adder control block |
| `tb_dfx_adder_rescaler` | adder rescaler |
| `tb_dfx_adder` | adder |
| `tb_dfx_mult_h_rescaler` | DFX-H rescaler |
| `tb_dfx_mult_h` | DFX-H multiplier |
| `tb_dfx_mult_f` | DFX-F multiplier |
| `tb_dfx_iir_filter` | filter, in both 32-bit formats |
| `tb_dfx_top` | whole design, default parameters |
| `tb_dfx_freq_response` | whole design, sinusoidal frequency response |

All of them finish in seconds.

## Files

| file | contents |
|------|----------|
| `rtl/dfx_pkg.sv` | default format, coefficient format, notch coefficients |
| `rtl/dfx_shift.sv` | constant re-alignment (wiring) with truncation/wrap |
| `rtl/dfx_range_detector.sv` | exponent bit from the sign-extension bits |
| `rtl/dfx_encoder.sv`, `rtl/dfx_decoder.sv` | fixed-point ⇄ DFX |
| `rtl/dfx_adder_ctrl.sv`, `rtl/dfx_adder_rescaler.sv`, `rtl/dfx_adder.sv` | DFX adder |
| `rtl/dfx_mult_h_rescaler.sv`, `rtl/dfx_mult_h.sv` | DFX x fixed-point multiplier |
| `rtl/dfx_mult_f.sv` | DFX x DFX multiplier |
| `rtl/dfx_iir_filter.sv` | Direct Form I notch filter |
| `rtl/dfx_top.sv` | encoder → filter → decoder, plus the DFX-F port |
| `tb/dfx_ref_pkg.sv` | arithmetic reference model |
| `tb/tb_*.sv` | self-checking testbenches |
