// fft1024_mdf_mff: 1024-point, 4-parallel, radix-2^4 pipelined FFT that mixes
// multi-path delay feedback (MDF) and multi-stream feedforward (MFF) stages.
//
// Four complex samples enter every cycle: at cycle t of a frame branch k gets
// x[4t + r(k)], r(k) being the 2-bit reversal of k (branches hold the index
// bits b1b0 = 00, 10, 01, 11). A frame takes 256 cycles and frames follow
// each other without gaps. Stages 1..8 act inside each branch, with buffer
// lengths 128, 64, 32, 16, 8, 4, 2, 1; stages 9 and 10 combine the branches.
// The stage types are chosen by buffer length and rotation type:
//   stage 1      MDF, trivial rotation, block-RAM buffer     (mdf_trivial)
//   stage 2      MDF, complex rotation, block-RAM buffer     (mdf_complex)
//   stages 3,5,7 MFF, trivial rotation, shift registers      (mff_trivial)
//   stages 4,6   MDF, complex rotation, shift registers      (mdf_complex)
//   stage 8      MFF, complex rotation, L = 1               (mff_complex)
//   stages 9,10  butterflies across branches                 (last_stages)
// One counter (fft_ctrl) drives every stage's control and memory addresses;
// nine ROMs hold the twiddles (one for stage 2, four for stage 4, one for
// stage 6, three for stage 8). The stage-2 ROM is stored in natural order
// because its address mapping already contains the offset.
//
// Output: 4 samples per cycle in bit-reversed order: branch k at in-frame
// time t holds X[bitrev10(4t + r(k))], scaled by 1/1024 (every butterfly
// halves). dout_valid rises 289 cycles after the first sample entered.
// Reset is synchronous and only restarts the counter; the first sample of
// frame 0 is expected in the first cycle with rst low.
module fft1024_mdf_mff
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  cplx_t      din  [P],
  output cplx_t      dout [P],
  output logic       dout_valid,
  output logic [7:0] dout_t
);
  logic [8:1] ctrl_s;
  logic [3:0] ctrl_rot;
  logic [6:0] ram_addr1;
  logic [5:0] ram_addr2;
  logic [3:0] rom_addr2, rom_addr6, rom_addr8;
  logic [7:0] rom_addr4;

  cplx_t st [1:9][P];   // st[s] = input of stage s
  coef_t cf2 [P], cf4 [P], cf6 [P], cf8 [P];
  coef_t c2, c6;

  fft_ctrl u_ctrl (
    .clk, .rst, .ctrl_s, .ctrl_rot, .ram_addr1, .ram_addr2,
    .rom_addr2, .rom_addr4, .rom_addr6, .rom_addr8, .dout_valid, .dout_t
  );

  // twiddle ROMs
  coef_rom #(.STAGE(2), .BRANCH(0), .ROT(0)) u_rom2 (.clk, .addr(rom_addr2), .dout(c2));
  coef_rom #(.STAGE(6), .BRANCH(0), .ROT(rom_rot(6))) u_rom6 (.clk, .addr(rom_addr6), .dout(c6));
  for (genvar k = 0; k < P; k++) begin : g_rom
    coef_rom #(.STAGE(4), .BRANCH(k), .ROT(rom_rot(4))) u_rom4 (.clk, .addr(rom_addr4), .dout(cf4[k]));
    assign cf2[k] = c2;
    assign cf6[k] = c6;
    if (k == 0) begin : g_one
      assign cf8[k] = '{c: CW'(1 << COEF_FRAC), s: '0};
    end else begin : g_rom8
      coef_rom #(.STAGE(8), .BRANCH(k), .ROT(rom_rot(8))) u_rom8 (.clk, .addr(rom_addr8), .dout(cf8[k]));
    end
  end

  assign st[1] = din;

  mdf_trivial #(.L(128)) u_st1 (.clk, .din(st[1]), .ctrl_s(ctrl_s[1]), .ctrl_rot(ctrl_rot[0]),
                                .ram_addr(ram_addr1), .dout(st[2]));
  mdf_complex #(.L(64), .USE_RAM(1'b1)) u_st2 (.clk, .din(st[2]), .ctrl_s(ctrl_s[2]),
                                .ram_addr(ram_addr2), .coef(cf2), .dout(st[3]));
  mff_trivial #(.L(32)) u_st3 (.clk, .din(st[3]), .ctrl_s(ctrl_s[3]), .ctrl_rot(ctrl_rot[1]),
                               .dout(st[4]));
  mdf_complex #(.L(16), .USE_RAM(1'b0)) u_st4 (.clk, .din(st[4]), .ctrl_s(ctrl_s[4]),
                                .ram_addr('0), .coef(cf4), .dout(st[5]));
  mff_trivial #(.L(8)) u_st5 (.clk, .din(st[5]), .ctrl_s(ctrl_s[5]), .ctrl_rot(ctrl_rot[2]),
                              .dout(st[6]));
  mdf_complex #(.L(4), .USE_RAM(1'b0)) u_st6 (.clk, .din(st[6]), .ctrl_s(ctrl_s[6]),
                                .ram_addr('0), .coef(cf6), .dout(st[7]));
  mff_trivial #(.L(2)) u_st7 (.clk, .din(st[7]), .ctrl_s(ctrl_s[7]), .ctrl_rot(ctrl_rot[3]),
                              .dout(st[8]));
  mff_complex u_st8 (.clk, .din(st[8]), .ctrl_s(ctrl_s[8]), .coef(cf8), .dout(st[9]));
  last_stages u_st910 (.clk, .din(st[9]), .dout(dout));
endmodule
