// fft_pkg: types, sizes and timing shared by the 1024-point 4-parallel
// radix-2^4 MDF-MFF FFT.
//
// Data are complex words of W=16 bits per part (cplx_t). Twiddle factors are
// 16-bit per part too, in two's complement with 2^14 representing 1.0
// (COEF_FRAC), so that cos(0)=1 is exact. Stage s (1..10) pairs samples whose
// index differs in bit b(10-s); within a branch the 256 samples of a frame
// arrive in natural order, so stage s (s<=8) needs a buffer of L=2^(8-s).
//
// The twiddle exponent of each complex stage (2, 4, 6, 8) follows the chosen
// radix-2^4 algorithm; the trivial stages (1, 3, 5, 7, 9) multiply by -j when
// the two index bits b(10-s) and b(9-s) are both 1. The stage latencies
// (L+2 for trivial stages, L+6 for complex ones, 1 for stages 9 and 10) and
// hence the stage start times 0, 130, 200, 234, 256, 266, 276, 280, 287, 288
// and the total latency of 289 cycles follow the design; rounding (truncation)
// and the scaling by 1/2 in every butterfly are this implementation's choice.
package fft_pkg;

  localparam int N         = 1024;
  localparam int P         = 4;
  localparam int W         = 16;
  localparam int CW        = 16;
  localparam int COEF_FRAC = 14;
  localparam int FRAME     = N / P;   // cycles per frame (256)

  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [CW-1:0] c;   // cosine part
    logic signed [CW-1:0] s;   // sine part (already negated: W^phi = c + j*s)
  } coef_t;

  // buffer length of stage s (1..8)
  function automatic int stage_len(input int s);
    return 1 << (8 - s);
  endfunction

  function automatic bit stage_is_complex(input int s);
    return (s == 2) || (s == 4) || (s == 6) || (s == 8);
  endfunction

  function automatic int stage_latency(input int s);
    if (s >= 9) return 1;
    return stage_is_complex(s) ? stage_len(s) + 6 : stage_len(s) + 2;
  endfunction

  // cycle at which sample 0 of frame 0 reaches the input of stage s (1..11)
  function automatic int stage_start(input int s);
    int t = 0;
    for (int i = 1; i < s; i++) t += stage_latency(i);
    return t;
  endfunction

  localparam int LATENCY = stage_start(11);

  // number of entries of the coefficient ROM of complex stage s
  function automatic int rom_depth(input int s);
    return (s == 4) ? 256 : 16;
  endfunction

  // cycles each ROM entry is used (stage 2 keeps one twiddle for 16 cycles)
  function automatic int rom_hold(input int s);
    return (s == 2) ? 16 : 1;
  endfunction

  // A complex stage samples the twiddle of its output j at its coefficient
  // input L+2+j cycles after sample 0 entered it; the ROM read is registered,
  // so the address for output j is due at cycle stage_start(s)+L+1+j.
  function automatic int rom_due(input int s);
    return stage_start(s) + stage_len(s) + 1;
  endfunction

  // delay on the counter bits that form the address of ROM s
  function automatic int rom_addr_delay(input int s);
    return rom_due(s) % rom_hold(s);
  endfunction

  // rotation of the ROM contents so that the (delayed) counter bits can be
  // used as address: entry j is stored at address (j + rom_rot(s)) mod depth
  function automatic int rom_rot(input int s);
    return (rom_due(s) / rom_hold(s)) % rom_depth(s);
  endfunction

  // delay on the counter bits that form ctrl_S / ctrl_rot of stage s
  function automatic int ctrl_delay(input int s);
    return stage_start(s) % (2 * stage_len(s));
  endfunction

  // index bits b1,b0 carried by a branch: branch 1 holds b1=1,b0=0 and
  // branch 2 holds b1=0,b0=1, i.e. the 2-bit reversal of the branch number
  function automatic int branch_low_bits(input int k);
    return ((k & 1) << 1) | ((k >> 1) & 1);
  endfunction

  function automatic int ib(input int idx, input int i);
    return (idx >> i) & 1;
  endfunction

  // twiddle exponent (in units of 2*pi/1024) after the butterfly of stage s
  // for the datum at index idx (b9..b0)
  function automatic int phi(input int s, input int idx);
    int lo6;
    lo6 = idx & 63;
    case (s)
      2: return (2*ib(idx,8) + ib(idx,9)) * (128*ib(idx,7) + 64*ib(idx,6));
      4: return (8*ib(idx,6) + 4*ib(idx,7) + 2*ib(idx,8) + ib(idx,9)) * lo6;
      6: return (32*ib(idx,4) + 16*ib(idx,5)) * (8*ib(idx,3) + 4*ib(idx,2));
      8: return (128*ib(idx,2) + 64*ib(idx,3) + 32*ib(idx,4) + 16*ib(idx,5))
                * (2*ib(idx,1) + ib(idx,0));
      default: return 256 * (ib(idx, 10-s) & ib(idx, 9-s));
    endcase
  endfunction

  function automatic coef_t twiddle(input int ph);
    real    ang;
    coef_t  r;
    ang = 2.0 * 3.14159265358979323846 * real'(ph % N) / real'(N);
    r.c = CW'($rtoi($floor($cos(ang) * real'(1 << COEF_FRAC) + 0.5)));
    r.s = CW'($rtoi($floor(-$sin(ang) * real'(1 << COEF_FRAC) + 0.5)));
    return r;
  endfunction

  // saturate a wider signed value to W bits
  function automatic logic signed [W-1:0] sat(input logic signed [W+1:0] v);
    if (v > $signed((W+2)'(2**(W-1) - 1)))  return {1'b0, {(W-1){1'b1}}};
    if (v < $signed(-(W+2)'(2**(W-1))))     return {1'b1, {(W-1){1'b0}}};
    return v[W-1:0];
  endfunction

  // (a + b) / 2 and (a - b) / 2 with truncation; cannot overflow
  function automatic logic signed [W-1:0] half_add(input logic signed [W-1:0] a,
                                                   input logic signed [W-1:0] b);
    logic signed [W:0] t;
    t = {a[W-1], a} + {b[W-1], b};
    return t[W:1];
  endfunction

  function automatic logic signed [W-1:0] half_sub(input logic signed [W-1:0] a,
                                                   input logic signed [W-1:0] b);
    logic signed [W:0] t;
    t = {a[W-1], a} - {b[W-1], b};
    return t[W:1];
  endfunction

endpackage
