// mff_complex: multi-stream feedforward (MFF) stage with L = 1 and a complex
// rotation (stage 8), in which the whole butterfly lives in the input and
// pre-adder registers of the rotator's multiplier slices.
//
// With L = 1 the two samples of a butterfly are consecutive. A1 takes every
// input; A2 (from A1) and D (from the input) are enabled only when ctrl_S = 1,
// i.e. when the odd sample of a pair is at the input, so they hold the pair
// x[2m] (A2) and x[2m+1] (D) for two cycles. The pre-adder, whose INMODE[2]
// is the negated ctrl_S (ctrl_S toggles every cycle, so negation replaces a
// delay register), forms A2 + D in the first of them and A2 - D in the second.
// The rotation follows (cplx_rotator); the imaginary line is one register
// later, as in the other complex stage. Branches whose bit in ROT_MASK is 0
// (branch 0: all its stage-8 twiddles are 1) keep the same pipeline without
// multipliers.
//
// Interface: ctrl_s = bit 0 of the input index; the twiddle for output j must
// be on coef[k] 3+j cycles after input index 0 was on din. Timing: output j
// leaves 7+j cycles after input index 0 entered.
// The butterfly outputs are halved (truncation): this implementation's choice.
module mff_complex
  import fft_pkg::*;
#(
  parameter int           NBR      = P,
  parameter bit [NBR-1:0] ROT_MASK = 4'b1110
) (
  input  logic  clk,
  input  cplx_t din  [NBR],
  input  logic  ctrl_s,
  input  coef_t coef [NBR],
  output cplx_t dout [NBR]
);
  logic ctrl_q, ctrl_q2;

  always_ff @(posedge clk) begin
    ctrl_q  <= ctrl_s;
    ctrl_q2 <= ctrl_q;
  end

  for (genvar k = 0; k < NBR; k++) begin : g_br
    cplx_t xr;
    logic signed [W-1:0] a1_x, a2_x, d_x, ad_x;
    logic signed [W-1:0] y2, a1_y, a2_y, d_y, ad_y;

    always_ff @(posedge clk) begin
      xr <= din[k];
      // x slices
      a1_x <= xr.re;
      if (ctrl_q) begin
        a2_x <= a1_x;
        d_x  <= xr.re;
      end
      ad_x <= !ctrl_q ? half_add(a2_x, d_x) : half_sub(a2_x, d_x);
      // y slices, one register later
      y2   <= xr.im;
      a1_y <= y2;
      if (ctrl_q2) begin
        a2_y <= a1_y;
        d_y  <= y2;
      end
      ad_y <= !ctrl_q2 ? half_add(a2_y, d_y) : half_sub(a2_y, d_y);
    end

    if (ROT_MASK[k]) begin : g_rot
      coef_t b_q;
      always_ff @(posedge clk) b_q <= coef[k];
      cplx_rotator u_rot (.clk, .xa(ad_x), .ya(ad_y), .cf(b_q), .dout(dout[k]));
    end else begin : g_pass
      logic signed [W-1:0] x1, x2, x3, yy1, yy2;
      always_ff @(posedge clk) begin
        x1 <= ad_x;  x2 <= x1;  x3 <= x2;
        yy1 <= ad_y; yy2 <= yy1;
      end
      assign dout[k].re = x3;
      assign dout[k].im = yy2;
    end
  end
endmodule
