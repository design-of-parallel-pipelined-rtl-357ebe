# 1024-point 4-parallel MDF-MFF pipelined FFT

This is a streaming FFT for high-throughput links (the 6G use case): four complex
16-bit samples enter every clock cycle. A new 1024-point transform starts every 256
cycles, with no gaps between frames. At 200 MHz that is 800 MS/s. The result of a
frame starts to leave 289 cycles after its first sample entered.

The main idea is to mix two kinds of pipelined stage inside one radix-2^4 FFT and pick
the cheaper kind for each stage:

* **MDF** (multi-path delay feedback): four parallel single-path delay-feedback stages.
  They use one buffer of L words per branch, but need two adders per line.
* **MFF** (multi-stream feedforward): four parallel single-stream feedforward stages.
  They need two buffers of L words per branch, but only one adder per line. The sum
  and the difference of a butterfly are made at different times by the same adder.

Small buffers are cheap (shift registers), so short trivial-rotation stages use MFF.
Long buffers need block RAM, so those stages use MDF. In complex-rotation stages the
butterfly adder is folded into the pre-adder of the multipliers that perform the
rotation. The architecture follows the master's thesis "Design of Parallel Pipelined
FFT Architectures for 6G on FPGAs". The RTL here is a generic SystemVerilog
implementation of it. It does not use any FPGA primitives.

## Data order

Within a frame, the input index is `n = b9 b8 ... b1 b0`. The two low bits choose the
branch and the eight high bits are the time:

| branch k | carries index bits b1 b0 | samples at frame time t |
|---------:|:------------------------:|:------------------------|
| 0 | 0 0 | x[4t]     |
| 1 | 1 0 | x[4t + 2] |
| 2 | 0 1 | x[4t + 1] |
| 3 | 1 1 | x[4t + 3] |

Branches 1 and 2 therefore take the odd/even pairs in swapped order (a 2-bit bit
reversal of k). Sample 0 of frame 0 must be on `din` in the first cycle after `rst`
falls. After that, frame f, time t is expected in cycle 256·f + t.

The output has the same layout, but in frequency. It is in the natural order of a
decimation-in-frequency FFT, which is bit-reversed: branch k at output time t holds
`X[bitrev10(4t + r(k))]`, where r(k) is the table above. No reordering buffer is
included. `dout_valid` rises 289 cycles after the first input and stays high.
`dout_t` gives the output time t.

The output is scaled. Every butterfly divides by 2, so `dout` = DFT / 1024.

## Stage lineup

Stage s combines samples whose indices differ in bit b(10-s). Inside a branch the
samples arrive in natural order, so stages 1 to 8 pair samples that are L = 2^(8-s)
cycles apart. Stages 9 and 10 pair samples from different branches.

| stage | L   | rotation after it | module | buffer | latency | starts at cycle |
|------:|----:|-------------------|--------|--------|--------:|----------------:|
| 1  | 128 | trivial (-j)          | `mdf_trivial`            | block RAM | 130 | 0   |
| 2  | 64  | complex, W16          | `mdf_complex` (USE_RAM=1) | block RAM | 70  | 130 |
| 3  | 32  | trivial               | `mff_trivial`            | shift reg | 34  | 200 |
| 4  | 16  | complex, W1024        | `mdf_complex` (USE_RAM=0) | shift reg | 22  | 234 |
| 5  | 8   | trivial               | `mff_trivial`            | shift reg | 10  | 256 |
| 6  | 4   | complex, W16          | `mdf_complex` (USE_RAM=0) | shift reg | 10  | 266 |
| 7  | 2   | trivial               | `mff_trivial`            | shift reg | 4   | 276 |
| 8  | 1   | complex, W64          | `mff_complex`            | multiplier input regs | 7 | 280 |
| 9  | -   | trivial               | `last_stages`            | none      | 1   | 287 |
| 10 | -   | none                  | `last_stages`            | none      | 1   | 288 |

The latencies follow from the registers in each stage:

* A trivial stage takes L + 2 cycles: an input register, L cycles of buffer, and the
  adder register.
* A complex stage takes L + 6 cycles: the input register, L, and five multiplier
  pipeline registers.
* Stage 8 takes 7 cycles.
* The whole FFT takes 289 cycles.

`fft_pkg` computes all start times from these rules. Nothing is hard-coded.

### MDF stage with trivial rotation (`mdf_trivial`)

For each line (real and imaginary) there is a feedback buffer with two adders.

* While `ctrl_s` = 0, the input is written into the buffer. The buffer output goes to
  the output: it is the difference stored L cycles earlier.
* While `ctrl_s` = 1, the buffer holds the older sample A and the input is the newer
  sample B. The output adder sends (A+B)/2 out, and the feedback adder writes (A−B)/2
  back into the buffer.
* In the second half of the difference, `ctrl_rot` = 1. The output multiplexers then
  swap the lines and negate one of them, which multiplies by −j.

The buffers of all four branches share one RAM per line. One 64-bit word holds the
four 16-bit values, as in one 512×72 block RAM. `bram_buffer` writes at the counter
address and reads the next address. Because the RAM read is registered, this makes the
buffer exactly L cycles long.

### MFF stage with trivial rotation (`mff_trivial`)

Each line has two chained L-cycle shift registers, r1 and r2, and one adder.

* While `ctrl_s` = 1, the adder forms r1 + input, which is A + B.
* While `ctrl_s` = 0, it forms r2 − r1, which is A − B.

The −j rotation costs only a multiplexer. The real-line adder swaps its operands,
giving B − A. Then the two registered outputs swap lines, so the result is
(A−B)·(−j).

### MDF stage with complex rotation (`mdf_complex`)

This stage keeps the feedback buffer of the MDF stage. The sum A + B is made by the
pre-adder of the multiplier slices, not by a separate adder:

* The A port of the slice gets the buffer output.
* The D port gets the input.
* `ctrl_s` drives INMODE[2]. When it is 1 the pre-adder gives A + D. When it is 0 the
  pre-adder passes A, which then holds the stored difference.

Four real multipliers then compute X = xC − yS and Y = xS + yC (`cplx_rotator`):

1. The two "x" multipliers compute x·C and x·S.
2. Their products go straight into the C register of the two "y" multipliers.
3. The "y" multipliers compute y·S and y·C, then subtract (for X) or add (for Y)
   the C value.

The imaginary line enters one cycle later than the real line to match this.

`USE_RAM` chooses where the buffers live:

* 1 for L = 64: the same shared RAM as stage 1.
* 0 for L = 16 and L = 4: shift registers.

### MFF stage with L = 1 and complex rotation (`mff_complex`)

The two samples of a butterfly are consecutive. Both MFF delay registers are the input
registers of the multipliers:

* A1 takes every sample.
* A2 (loaded from A1) and D (loaded from the input) are enabled only on odd samples.
  They therefore hold the pair x[2m], x[2m+1] for two cycles.
* The pre-adder forms A2 + D in the first of those cycles and A2 − D in the second.

`ctrl_s` toggles every cycle, so the pre-adder control is simply its negation. No extra
delay register is needed. All of branch 0's stage-8 twiddles are 1, so branch 0 has no
multipliers, only matching registers (`ROT_MASK`).

### Stages 9 and 10 (`last_stages`)

These stages are butterflies across branches, each followed by a register:

* Stage 9 combines branches 0/1 and 2/3.
* Between the stages, the 2/3 difference (b1 = b0 = 1) is multiplied by −j.
* Stage 10 combines branches 0/2 and 1/3.

## Twiddle factors

Radix-2^4 confines the non-trivial rotations to stages 2, 4, 6 and 8. Among the
radix-2^4 variants, the one used here has these exponents (in units of 2π/1024, bit
lists read MSB first):

```
phi2 = [b8 b9]       * [b7 b6 000000]        W16
phi4 = [b6 b7 b8 b9] * [b5 b4 b3 b2 b1 b0]   W1024
phi6 = [b4 b5 0000]  * [b3 b2 00]            W16
phi8 = [b2 b3 b4 b5 0000] * [b1 b0]          W64
```

Each branch has b1 b0 fixed, so some of these tables shrink. Nine ROMs are needed:

| stage | ROMs | entries | indexed by | shared by branches |
|------:|-----:|--------:|------------|--------------------|
| 2 | 1 | 16  | b9..b6, each entry used for 16 cycles | yes |
| 4 | 4 | 256 | b9..b2 | no, one ROM per branch |
| 6 | 1 | 16  | b5..b2 | yes |
| 8 | 3 | 16  | b5..b2 | no, branches 1 to 3 (branch 0 needs none) |

`coef_rom` computes its contents during elaboration: W^phi = cos + j·sin, with 16 bits
per part and 2^14 = 1.0. The contents of the stage-4, -6 and -8 ROMs are stored
*rotated*, so the address can be taken straight from the global counter with no delay
line. Entry j sits at address (j + ROT) mod depth. The rotation is 251 for stage 4, 15
for stage 6 and 10 for stage 8. `fft_pkg::rom_rot()` derives these values from the
stage start times and the one-cycle ROM read. The stage-2 ROM is stored in natural
order. Its offset of 4 entries is built into its address instead (see Control).

A complex stage reads the twiddle for its output j at its coefficient input
L + 2 + j cycles after input j. That is when the B register of the "x" multipliers
loads it.

## Control

One counter, `cnt` in `fft_ctrl`, drives everything. It is 0 in the cycle of the first
input sample.

* Each stage uses ctrl_S = cnt[log2 L], so it toggles every L cycles.
* Trivial stages also use ctrl_rot = !cnt[log2 L] & cnt[log2 L − 1], which is high in
  the last quarter of each 2L period.
* Stages do not start at a multiple of 2L, so each stage's control pair is delayed by
  (start time mod 2L) cycles: 0, 2, 8, 10, 0, 2, 0, 0 for stages 1 to 8.
* The RAM addresses are cnt[6:0] for stage 1 and cnt[5:0] for stage 2.
* The ROM addresses are cnt[7:0] for stage 4 and cnt[3:0] for stages 6 and 8.
* Stage 2's entries change every 16 cycles, at a point that is not aligned to the
  counter. Its address takes cnt[7:4], delays it by 3 cycles and remaps it as
  {b7^b6, !b6, b5, b4}. That mapping adds 4 to the entry number without an adder. An
  elaboration-time check in `fft_ctrl` fails if the stage timing ever asks for a
  different offset.

## Number format and accuracy

* Data are 16-bit two's complement for each part (`fft_pkg::cplx_t`).
* Every butterfly output is (a ± b)/2, truncated toward −∞. Halving at all ten stages
  makes the output the DFT divided by 1024.
* The rotator products are shifted right by 14 (truncated) and saturated to 16 bits.
  The −j negation also saturates.
* Against a double-precision DFT, random full-scale (±16000) frames, a tone and an
  impulse give at most 4 LSB of error per output component.

## How far this follows the source design, and where it departs

These parts follow the source design:

* The stage types, buffer lengths and per-stage latencies.
* The shared-RAM buffer layout.
* The pre-adder use of INMODE[2], and the A1/A2/D trick for L = 1.
* The twiddle algorithm and the ROM sizes.
* The single counter with delayed control bits and rotated ROM contents.

This implementation made the following choices where the source is silent, or where its
statements conflict:

* **Scaling and rounding** (divide by 2 per butterfly, truncation, saturation, 14
  fractional bits in the twiddles) are not specified by the source.
* **Latency is 289 cycles**, and stage 8 takes 7 cycles. One formula in the source
  gives 8 cycles for stage 8, and one place gives 290 cycles in total. The register
  timing of the L = 1 stage gives 7.
* **The RAM buffer reads one address ahead of the write.** The source describes reading
  and writing the same address. With a registered read, that would make the buffer one
  cycle too long.
* **The stage-6 control is delayed by 2 cycles.** Its start time, 266, is not a multiple
  of 8. The source states that no delay is needed there.
* **ROM rotations and the stage-2 address delay** are one or two larger than the values
  quoted in the source (250/14/8 and a 2-cycle delay). The difference comes from the registered ROM
  read and the coefficient-port timing chosen here. The end-to-end test checks the
  values used here.
* **Output sign conventions.** The butterfly gives A − B (older minus newer) and the
  trivial rotation is ×(−j), as a DIF FFT needs. This is checked against a reference
  DFT.
* **No reset on the datapath and no input valid.** Frames must arrive back to back
  after reset. The output is bit-reversed.
* **Generic RTL replaces the FPGA primitives.** The multipliers are written as ordinary
  multiply and add registers with the DSP48E1 pipeline depth. The buffers are arrays
  and shift registers. Mapping them onto SRL16/SRL32, DSP48E1 and 512×72 block RAM is
  left to synthesis, so LUT/DSP/BRAM counts, clock rate and power are not reproduced.

## Files

`rtl/`:

* `fft_pkg.sv` holds the types, twiddle exponents, stage timing and saturation/halving
  helpers.
* `fft1024_mdf_mff.sv` is the top level.
* `mdf_trivial.sv`, `mdf_complex.sv`, `mff_trivial.sv` and `mff_complex.sv` are the
  stage types.
* `last_stages.sv` is stages 9 and 10.
* `cplx_rotator.sv` is the four-multiplier rotator pipeline.
* `bram_buffer.sv` is the shared 4-branch RAM buffer. `srl_delay.sv` is the shift
  register / delay line.
* `coef_rom.sv` is the twiddle ROM. `fft_ctrl.sv` is the counter and control.

`tb/`:

* There is one self-checking testbench `tb_<module>.sv` per module, plus
  `tb_ref_pkg.sv` with the integer reference arithmetic.
* The stage testbenches are bit-exact. Each checks the exact output cycle, which is
  the stage latency.
* `tb_fft1024_mdf_mff.sv` runs four back-to-back frames through the full-size FFT and
  compares them with a DFT. It also checks the 289-cycle latency and counts the
  butterfly phases and −j rotations of every stage.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fft_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_fft1024_mdf_mff.sv --top-module tb_fft1024_mdf_mff -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Replace the
testbench file and top-module name to run another one. `-Irtl` lets Verilator find
the sub-modules by name. The full-size run takes well under a second.

To change the word length, edit `W`, `CW` and `COEF_FRAC` in `fft_pkg`. The stage
modules take `L` as a parameter. Changing N or P, however, also changes the twiddle
exponents, the ROM sizes and the stage lineup in the top.
