// cplx_rotator: general complex rotator built from four real multipliers in
// the pipeline of four DSP slices (X = x*C - y*S, Y = x*S + y*C).
//
// The real-part operand `xa` and the coefficient `cf` are taken together at
// cycle k (they come from the pre-adder register AD and the B register of the
// two "x" slices). The imaginary-part operand `ya` is taken one cycle later,
// at k+1, because the two "y" slices have one more input register. The x
// products go through the M register and then straight into the C register of
// the y slices; the y slices multiply, then add (Y) or subtract (X) the C
// value in their P register. Result: `dout` valid at k+3.
// The product is shifted right by COEF_FRAC (truncation) and saturated to W
// bits; both are this implementation's choices.
module cplx_rotator
  import fft_pkg::*;
(
  input  logic                clk,
  input  logic signed [W-1:0] xa,    // cycle k
  input  logic signed [W-1:0] ya,    // cycle k+1
  input  coef_t               cf,    // cycle k
  output cplx_t               dout   // cycle k+3
);
  logic signed [W+CW-1:0] m_xc, m_xs, c_xc, c_xs, m_ys, m_yc;
  coef_t                  cf2;
  logic signed [W+CW:0]   p_x, p_y;

  assign p_x = (W+CW+1)'(c_xc) - (W+CW+1)'(m_ys);
  assign p_y = (W+CW+1)'(c_xs) + (W+CW+1)'(m_yc);

  always_ff @(posedge clk) begin
    // x slices: M register (k+1), then C register of the y slices (k+2)
    m_xc <= xa * cf.c;
    m_xs <= xa * cf.s;
    c_xc <= m_xc;
    c_xs <= m_xs;
    // y slices: second coefficient register (k+1), M register (k+2)
    cf2  <= cf;
    m_ys <= ya * cf2.s;
    m_yc <= ya * cf2.c;
    // P registers (k+3)
    dout.re <= sat((W+2)'(p_x >>> COEF_FRAC));
    dout.im <= sat((W+2)'(p_y >>> COEF_FRAC));
  end
endmodule
