// dfx_shift - fixed re-alignment of a two's complement word.
//
// Moves the radix point of din by a constant: SHR > 0 is an arithmetic
// right shift (sign-extending, low bits dropped, i.e. truncation towards
// minus infinity), SHR < 0 a left shift with zero padding. The result is cut
// to its W_OUT least significant bits (the "mod 2^(n-1)" of the DFX
// rescalers) or sign-extended to W_OUT. Being a constant shift it is wiring
// only. Combinational.
module dfx_shift #(
  parameter int W_IN  = 32,
  parameter int W_OUT = 31,
  parameter int SHR   = 0
) (
  input  logic signed [W_IN-1:0]  din,
  output logic signed [W_OUT-1:0] dout
);

  localparam int LSH = (SHR < 0) ? -SHR : 0;
  localparam int WW  = ((W_IN > W_OUT) ? W_IN : W_OUT) + LSH + 1;

  logic signed [WW-1:0] ext;
  logic signed [WW-1:0] shifted;

  assign ext = WW'(din);

  if (SHR >= 0) begin : g_right
    assign shifted = ext >>> SHR;
  end else begin : g_left
    assign shifted = ext <<< LSH;
  end

  assign dout = shifted[W_OUT-1:0];

endmodule
