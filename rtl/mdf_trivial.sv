// mdf_trivial: multi-path delay feedback (MDF) radix-2 stage with a trivial
// rotation and a block-RAM buffer, for L > 32 (stage 1, L = 128).
//
// Each of the P branches is a delay-feedback (SDF') stage. While ctrl_S = 0
// the input goes into the L-cycle feedback buffer and the buffer output
// (the difference stored one half-period earlier) goes to the output. While
// ctrl_S = 1 the buffer holds the older sample A and the input is the newer
// sample B: Adder2 sends A + B to the output and Adder1 writes A - B back into
// the buffer. The buffers of the P branches share one RAM per line (real and
// imaginary), written and read at `ram_addr` every cycle (see bram_buffer).
// In the second half of the difference (ctrl_rot = 1) the output multiplexers
// swap the lines and the real one is negated: (A - B) * (-j).
//
// Interface: din/ctrl_s/ctrl_rot/ram_addr aligned; ctrl_s = bit log2(L) and
// ctrl_rot = !bit log2(L) & bit log2(L)-1 of the input sample's index;
// ram_addr steps through 0..L-1. Timing: output index j leaves L+2+j cycles
// after input index 0 entered. Butterfly outputs are divided by 2
// (truncation) and the negation saturates: this implementation's choices.
module mdf_trivial
  import fft_pkg::*;
#(
  parameter int L     = 128,
  parameter int NBR   = P,
  localparam int AW   = $clog2(L)
) (
  input  logic          clk,
  input  cplx_t         din      [NBR],
  input  logic          ctrl_s,
  input  logic          ctrl_rot,
  input  logic [AW-1:0] ram_addr,
  output cplx_t         dout     [NBR]
);
  logic ctrl_q, rot_q, rot_q2;
  logic [AW-1:0] addr_q;
  logic [NBR*W-1:0] wr_re, wr_im, rd_re, rd_im;

  always_ff @(posedge clk) begin
    ctrl_q <= ctrl_s;
    rot_q  <= ctrl_rot;
    rot_q2 <= rot_q;
    addr_q <= ram_addr;
  end

  bram_buffer #(.WIDTH(NBR*W), .L(L)) u_ram_re (.clk, .addr(addr_q), .din(wr_re), .dout(rd_re));
  bram_buffer #(.WIDTH(NBR*W), .L(L)) u_ram_im (.clk, .addr(addr_q), .din(wr_im), .dout(rd_im));

  for (genvar k = 0; k < NBR; k++) begin : g_br
    cplx_t xr, bo, bi, o;

    always_ff @(posedge clk) xr <= din[k];

    assign bo.re = rd_re[k*W +: W];
    assign bo.im = rd_im[k*W +: W];

    // Adder1 / MUX2 / MUX3: feedback into the buffer
    assign bi.re = ctrl_q ? half_sub(bo.re, xr.re) : xr.re;
    assign bi.im = ctrl_q ? half_sub(bo.im, xr.im) : xr.im;
    assign wr_re[k*W +: W] = bi.re;
    assign wr_im[k*W +: W] = bi.im;

    // Adder2 / MUX1 and the output register
    always_ff @(posedge clk) begin
      o.re <= ctrl_q ? half_add(bo.re, xr.re) : bo.re;
      o.im <= ctrl_q ? half_add(bo.im, xr.im) : bo.im;
    end

    // MUX4 / MUX5: trivial rotation by -j
    assign dout[k].re = rot_q2 ? o.im : o.re;
    assign dout[k].im = rot_q2 ? sat(-(W+2)'(o.re)) : o.im;
  end
endmodule
