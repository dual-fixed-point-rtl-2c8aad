// dfx_iir_filter - second-order Direct Form I IIR filter in DFX arithmetic.
//
//   y[k] = (b0*x[k] + (b1*x[k-1] + b2*x[k-2])) + (a1*y[k-1] + a2*y[k-2])
//
// Five DFX-H multipliers (DFX sample times constant M.PM coefficient), four
// DFX adders in the order of the paper's signal-flow graph, and four delay
// registers: two on the input, two on the output. The defaults make a notch
// at 0.15 of the Nyquist frequency. The structure follows the paper.
// The coefficient values (pole radius 0.9, 32.30 format) are this design's
// choice, since the paper does not print them.
//
// Timing (this design's choice): one sample per clock cycle. When in_valid
// is high, x is taken, the delay line advances and y is registered;
// out_valid is in_valid delayed by one cycle. The whole arithmetic path
// from x to the output register is combinational. Reset (asynchronous,
// active low) clears the delay line and the output to DFX zero.
module dfx_iir_filter #(
  parameter int N  = dfx_pkg::DFX_N,
  parameter int P0 = dfx_pkg::DFX_P0,
  parameter int P1 = dfx_pkg::DFX_P1,
  parameter int M  = dfx_pkg::COEF_M,
  parameter int PM = dfx_pkg::COEF_PM,
  parameter logic signed [M-1:0] B0 = M'(dfx_pkg::NOTCH_B0),
  parameter logic signed [M-1:0] B1 = M'(dfx_pkg::NOTCH_B1),
  parameter logic signed [M-1:0] B2 = M'(dfx_pkg::NOTCH_B2),
  parameter logic signed [M-1:0] A1 = M'(dfx_pkg::NOTCH_A1),
  parameter logic signed [M-1:0] A2 = M'(dfx_pkg::NOTCH_A2)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] x,
  output logic         out_valid,
  output logic [N-1:0] y
);

  // Delay line and products.
  logic [N-1:0] x1, x2, y1, y2;
  logic [N-1:0] m_b0, m_b1, m_b2, m_a1, m_a2;
  logic [N-1:0] s_b12, s_fwd, s_fb, y_new;

  dfx_mult_h #(.N(N), .P0(P0), .P1(P1), .M(M), .PM(PM)) u_mul_b0 (.a(x),  .m(B0), .q(m_b0));
  dfx_mult_h #(.N(N), .P0(P0), .P1(P1), .M(M), .PM(PM)) u_mul_b1 (.a(x1), .m(B1), .q(m_b1));
  dfx_mult_h #(.N(N), .P0(P0), .P1(P1), .M(M), .PM(PM)) u_mul_b2 (.a(x2), .m(B2), .q(m_b2));
  dfx_mult_h #(.N(N), .P0(P0), .P1(P1), .M(M), .PM(PM)) u_mul_a1 (.a(y1), .m(A1), .q(m_a1));
  dfx_mult_h #(.N(N), .P0(P0), .P1(P1), .M(M), .PM(PM)) u_mul_a2 (.a(y2), .m(A2), .q(m_a2));

  dfx_adder #(.N(N), .P0(P0), .P1(P1)) u_add_b12 (.a(m_b1), .b(m_b2),  .s(s_b12));
  dfx_adder #(.N(N), .P0(P0), .P1(P1)) u_add_fwd (.a(m_b0), .b(s_b12), .s(s_fwd));
  dfx_adder #(.N(N), .P0(P0), .P1(P1)) u_add_fb  (.a(m_a1), .b(m_a2),  .s(s_fb));
  dfx_adder #(.N(N), .P0(P0), .P1(P1)) u_add_out (.a(s_fwd), .b(s_fb), .s(y_new));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1        <= '0;
      x2        <= '0;
      y1        <= '0;
      y2        <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1 <= x;
        x2 <= x1;
        y1 <= y_new;
        y2 <= y1;
        y  <= y_new;
      end
    end
  end

endmodule
