// mdf_complex: multi-path delay feedback (MDF) radix-2 stage followed by a
// general complex rotator, for L >= 2 (stages 2, 4 and 6: L = 64, 16, 4).
//
// Each branch keeps the delay-feedback buffer of an SDF' stage: while
// ctrl_S = 0 the input is written into the L-cycle buffer; while ctrl_S = 1
// the buffer holds the older sample A, the input is the newer sample B, and
// A - B is written back. The sum A + B is not formed by a separate adder but
// by the pre-adder of the rotator's multiplier slices: their A port takes the
// buffer output and their D port the input, and ctrl_S drives INMODE[2], so
// the pre-adder gives A + D while ctrl_S = 1 and passes A (the stored
// difference) while ctrl_S = 0. The rotation X = xC - yS, Y = xS + yC then
// follows (cplx_rotator). The imaginary line has one extra register in front
// of its slices, as the y slices use two input registers.
// USE_RAM = 1 puts the buffers of all branches in one RAM per line (L > 32),
// USE_RAM = 0 uses shift registers.
//
// Interface: din, ctrl_s (= bit log2(L) of the input index) and ram_addr are
// aligned; the twiddle for output j must be on coef[k] L+2+j cycles after
// input index 0 was on din. Timing: output j leaves L+6+j cycles after input
// index 0 entered (input register, L, five multiplier-slice registers).
// The sum is halved inside the pre-adder and the stored difference is halved
// before it is written: this implementation's scaling choice.
module mdf_complex
  import fft_pkg::*;
#(
  parameter int L       = 64,
  parameter bit USE_RAM = 1'b1,
  parameter int NBR     = P,
  localparam int AW     = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  cplx_t         din      [NBR],
  input  logic          ctrl_s,
  input  logic [AW-1:0] ram_addr,
  input  coef_t         coef     [NBR],
  output cplx_t         dout     [NBR]
);
  logic ctrl_q, inm_x, inm_y1, inm_y2;
  logic [NBR*W-1:0] wr_re, wr_im, rd_re, rd_im;

  always_ff @(posedge clk) begin
    ctrl_q <= ctrl_s;
    inm_x  <= ctrl_q;   // INMODE[2] of the x slices (with their A/D registers)
    inm_y1 <= ctrl_q;
    inm_y2 <= inm_y1;   // INMODE[2] of the y slices (one register later)
  end

  if (USE_RAM) begin : g_ram
    logic [AW-1:0] addr_q;
    always_ff @(posedge clk) addr_q <= ram_addr;
    bram_buffer #(.WIDTH(NBR*W), .L(L)) u_ram_re (.clk, .addr(addr_q), .din(wr_re), .dout(rd_re));
    bram_buffer #(.WIDTH(NBR*W), .L(L)) u_ram_im (.clk, .addr(addr_q), .din(wr_im), .dout(rd_im));
  end else begin : g_srl
    srl_delay #(.WIDTH(NBR*W), .DEPTH(L)) u_srl_re (.clk, .din(wr_re), .dout(rd_re));
    srl_delay #(.WIDTH(NBR*W), .DEPTH(L)) u_srl_im (.clk, .din(wr_im), .dout(rd_im));
  end

  for (genvar k = 0; k < NBR; k++) begin : g_br
    cplx_t xr, bo;
    logic signed [W-1:0] a_x, d_x, ad_x;        // x slices
    logic signed [W-1:0] y2, a1_y, a2_y, d_y, ad_y;  // y slices
    coef_t b_q;

    always_ff @(posedge clk) xr <= din[k];

    assign bo.re = rd_re[k*W +: W];
    assign bo.im = rd_im[k*W +: W];

    // Adder_x / Adder_y with MUX2 and MUX3: buffer feedback
    assign wr_re[k*W +: W] = ctrl_q ? half_sub(bo.re, xr.re) : xr.re;
    assign wr_im[k*W +: W] = ctrl_q ? half_sub(bo.im, xr.im) : xr.im;

    always_ff @(posedge clk) begin
      // x slices: A, D and B registers, then pre-adder register AD
      a_x  <= bo.re;
      d_x  <= xr.re;
      b_q  <= coef[k];
      ad_x <= inm_x ? half_add(a_x, d_x) : a_x;
      // y slices: extra input register, A1/A2 and D registers, AD
      y2   <= xr.im;
      a1_y <= bo.im;
      a2_y <= a1_y;
      d_y  <= y2;
      ad_y <= inm_y2 ? half_add(a2_y, d_y) : a2_y;
    end

    cplx_rotator u_rot (.clk, .xa(ad_x), .ya(ad_y), .cf(b_q), .dout(dout[k]));
  end
endmodule
