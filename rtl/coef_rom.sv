// coef_rom: twiddle-factor ROM of one complex stage and branch.
//
// Entry q holds W_1024^phi = cos + j*sin (16 + 16 bits, 1.0 = 2^14) for the
// data the stage rotates with that entry:
//   stage 2: 16 entries, q = index bits b9..b6, shared by all branches;
//            each entry is used for 16 consecutive cycles
//   stage 4: 256 entries, q = b9..b2, one ROM per branch (b1,b0 fixed)
//   stage 6: 16 entries, q = b5..b2, shared by all branches
//   stage 8: 16 entries, q = b5..b2, one ROM per branch 1..3
// The exponent phi is the one of the chosen radix-2^4 algorithm (fft_pkg::phi).
// The contents are stored rotated by ROT addresses, entry q at address
// (q + ROT) mod DEPTH, so that the address can be taken straight from the
// design's counter without a delay. The contents are computed at elaboration.
// Timing: registered read, dout(t) = ROM[addr(t-1)].
module coef_rom
  import fft_pkg::*;
#(
  parameter int STAGE  = 4,
  parameter int BRANCH = 0,
  parameter int ROT    = 0,
  localparam int DEPTH = rom_depth(STAGE),
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output coef_t         dout
);
  typedef logic [2*CW-1:0] rom_t [DEPTH];

  function automatic rom_t fill();
    rom_t r;
    int q, idx;
    for (int a = 0; a < DEPTH; a++) begin
      q = (a - ROT + DEPTH) % DEPTH;
      case (STAGE)
        2:       idx = q << 6;
        6:       idx = q << 2;
        default: idx = (q << 2) | branch_low_bits(BRANCH);
      endcase
      r[a] = twiddle(phi(STAGE, idx));
    end
    return r;
  endfunction

  localparam rom_t ROM = fill();

  always_ff @(posedge clk) dout <= coef_t'(ROM[addr]);
endmodule
