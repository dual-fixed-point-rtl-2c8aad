// dfx_range_detector - DFX exponent bit from a fixed-point number.
//
// The input d is a two's complement fixed-point number with N_IN bits, P_IN
// of them fractional. The output e is 0 when -B <= d < B and 1 otherwise,
// where B = 2^(N-P0-2) is the Num0/Num1 boundary of the DFX format N_P0_P1.
// Because B is a power of two one step above the largest Num0 value, no
// comparator is needed: d lies in Num0 exactly when all of its bits from
// the MSB down to bit P_IN+N-P0-2 (the sign bit of the Num0 window) are
// equal. So e = NOT(all ones) AND NOT(all zeros) over those bits.
//
// The bit-field form follows the paper. The handling of a boundary
// above the MSB (e is always 0) or below the LSB (e = d != 0) is this
// design's own. Combinational.
module dfx_range_detector #(
  parameter int N_IN = 32,
  parameter int P_IN = 18,
  parameter int N    = dfx_pkg::DFX_N,
  parameter int P0   = dfx_pkg::DFX_P0
) (
  input  logic [N_IN-1:0] d,
  output logic            e
);

  // Lowest bit that must agree with the sign for a Num0 value.
  localparam int LO = P_IN + N - P0 - 2;

  if (LO > N_IN - 1) begin : g_never
    // The boundary lies above the input's range: every input is Num0.
    // The input is not needed in this configuration.
    logic unused;
    assign unused = ^d;
    assign e = 1'b0;
  end else if (LO < 0) begin : g_nonzero
    // The boundary lies below one LSB: only zero is inside [-B, B).
    assign e = |d;
  end else begin : g_field
    logic [N_IN-1-LO:0] field;
    assign field = d[N_IN-1:LO];
    assign e = ~(&field) & (|field);
  end

endmodule
