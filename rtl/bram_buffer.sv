// bram_buffer: L-cycle delay buffer for the P parallel branches held in one
// simple-dual-port RAM, as used for the large buffers (L > 32) of stages 1
// and 2.
//
// The P words of one line (real or imaginary) are concatenated and stored at
// the same address (P x 16 = 64 bits of a 512 x 72 block RAM). `addr` steps
// through 0..L-1 and wraps; it comes from the low log2(L) bits of the
// design's counter. Each cycle `din` is written at `addr` while the word at
// addr+1, the oldest one, is read into the RAM output register. The read
// register adds one cycle, so reading one address ahead makes the buffer an
// exact L-cycle delay: dout(t) = din(t - L), like an L-stage shift register.
// Reading one address ahead of the write is this implementation's way of
// absorbing the RAM read latency.
module bram_buffer #(
  parameter int WIDTH = 64,
  parameter int L     = 128,
  localparam int AW   = (L > 1) ? $clog2(L) : 1
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] mem [L];
  logic [AW-1:0]    rd_addr;

  assign rd_addr = (addr == AW'(L - 1)) ? '0 : addr + 1'b1;

  always_ff @(posedge clk) begin
    dout      <= mem[rd_addr];
    mem[addr] <= din;
  end
endmodule
