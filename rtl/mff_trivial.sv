// mff_trivial: multi-stream feedforward (MFF) radix-2 stage with a trivial
// rotation, for buffer lengths L <= 32 (stages 3, 5 and 7: L = 32, 8, 2).
//
// Each of the P branches is a single-stream feedforward stage: the input
// register feeds two chained L-cycle shift registers r1 and r2. While
// ctrl_S = 1 one adder per line forms the sum of r1 (older sample A) and the
// input (newer sample B); while ctrl_S = 0 the same adder forms A - B from r2
// and r1. The -j rotation of the second half of the difference (ctrl_rot = 1)
// costs one multiplexer per line: the real-line adder swaps its operands
// (giving B - A) and the two output multiplexers swap the real and imaginary
// lines, so the output is (A - B) * (-j).
//
// Interface: din/ctrl_s/ctrl_rot are aligned; ctrl_s = bit log2(L) and
// ctrl_rot = !bit log2(L) & bit log2(L)-1 of the index of the sample at din.
// Timing: output index j leaves L+2+j cycles after input index 0 entered
// (input register, L, adder register), the order of samples is unchanged.
// Every butterfly output is divided by 2 (truncated): this implementation's
// choice to keep 16-bit words.
module mff_trivial
  import fft_pkg::*;
#(
  parameter int L     = 32,
  parameter int NBR   = P
) (
  input  logic  clk,
  input  cplx_t din      [NBR],
  input  logic  ctrl_s,
  input  logic  ctrl_rot,
  output cplx_t dout     [NBR]
);
  logic ctrl_q, rot_q, rot_q2;

  always_ff @(posedge clk) begin
    ctrl_q <= ctrl_s;
    rot_q  <= ctrl_rot;
    rot_q2 <= rot_q;
  end

  for (genvar k = 0; k < NBR; k++) begin : g_br
    cplx_t xr, r1, r2, o;

    always_ff @(posedge clk) xr <= din[k];

    srl_delay #(.WIDTH(2*W), .DEPTH(L)) u_r1 (.clk, .din(xr), .dout(r1));
    srl_delay #(.WIDTH(2*W), .DEPTH(L)) u_r2 (.clk, .din(r1), .dout(r2));

    always_ff @(posedge clk) begin
      if (ctrl_q) begin
        o.re <= half_add(r1.re, xr.re);
        o.im <= half_add(r1.im, xr.im);
      end else begin
        o.re <= rot_q ? half_sub(r1.re, r2.re) : half_sub(r2.re, r1.re);
        o.im <= half_sub(r2.im, r1.im);
      end
    end

    assign dout[k].re = rot_q2 ? o.im : o.re;
    assign dout[k].im = rot_q2 ? o.re : o.im;
  end
endmodule
