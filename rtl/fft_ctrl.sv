// fft_ctrl: the single counter of the FFT and everything derived from it.
//
// A free-running counter `cnt` starts at 0 in the first cycle after reset,
// the cycle in which sample 0 of frame 0 is at the FFT input. For each stage s
// with buffer length L the butterfly control is
//   ctrl_S   = cnt[log2 L]
//   ctrl_rot = !cnt[log2 L] & cnt[log2 L - 1]   (trivial stages)
// delayed by (start of stage s) mod 2L cycles, which aligns them with the
// stage's own input (delays 0, 2, 8, 10, 0, 2, 0, 0 for stages 1..8).
// RAM addresses are the counter's low bits (7 for stage 1, 6 for stage 2).
// ROM addresses are counter bits too: cnt[3:0] for stages 6 and 8 and
// cnt[7:0] for stage 4, whose ROM contents are rotated to absorb the stage
// offset. Stage 2 changes twiddle every 16 cycles, so its address is made
// from cnt[7:4], delayed by 3 cycles, as {b7^b6, !b6, b5, b4}: this adds 4
// to the entry number, which is the offset of that stage, without an adder.
// The addresses are due one cycle before a twiddle is used because the ROMs
// are registered.
// dout_valid rises LATENCY (289) cycles after reset and stays high; dout_t is
// the in-frame time index of the sample then at the FFT output.
module fft_ctrl
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output logic [8:1] ctrl_s,
  output logic [3:0] ctrl_rot,    // ctrl_rot[i] belongs to trivial stage 2i+1
  output logic [6:0] ram_addr1,
  output logic [5:0] ram_addr2,
  output logic [3:0] rom_addr2,
  output logic [7:0] rom_addr4,
  output logic [3:0] rom_addr6,
  output logic [3:0] rom_addr8,
  output logic       dout_valid,
  output logic [7:0] dout_t
);
  logic [8:0] cnt;
  logic [8:0] up;   // cycles since reset, saturating at LATENCY

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      up  <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (up != 9'(LATENCY)) up <= up + 1'b1;
    end
  end

  assign dout_valid = (up == 9'(LATENCY));
  assign dout_t     = cnt[7:0] - 8'(LATENCY % FRAME);

  for (genvar s = 1; s <= 8; s++) begin : g_stage
    localparam int LB = $clog2(stage_len(s));
    logic [1:0] raw, dly;
    assign raw[0] = cnt[LB];
    if (LB > 0) begin : g_rot
      assign raw[1] = !cnt[LB] && cnt[LB-1];
    end else begin : g_norot
      assign raw[1] = 1'b0;   // stage 8 has no trivial rotation
    end
    srl_delay #(.WIDTH(2), .DEPTH(ctrl_delay(s))) u_dly (.clk, .din(raw), .dout(dly));
    assign ctrl_s[s] = dly[0];
    if (s % 2 == 1) begin : g_rot_out
      assign ctrl_rot[s / 2] = dly[1];
    end
  end

  assign ram_addr1 = cnt[6:0];
  assign ram_addr2 = cnt[5:0];

  logic [3:0] cnt2;
  srl_delay #(.WIDTH(4), .DEPTH(rom_addr_delay(2))) u_rom2_dly
    (.clk, .din(cnt[7:4]), .dout(cnt2));
  assign rom_addr2 = {cnt2[3] ^ cnt2[2], !cnt2[2], cnt2[1], cnt2[0]};
  // the bit mapping above adds 4 (mod 16) to the entry number; it is right
  // only if the stage-2 timing asks for exactly that offset
  if (((16 - rom_rot(2)) % 16) != 4) begin : g_bad_rom2
    $error("stage-2 ROM offset %0d does not match the address mapping", rom_rot(2));
  end
  assign rom_addr4 = cnt[7:0];
  assign rom_addr6 = cnt[3:0];
  assign rom_addr8 = cnt[3:0];
endmodule
