// srl_delay: fixed delay line of DEPTH clock cycles for a WIDTH-bit word.
//
// This is the shift-register (SRL) buffer of the MFF and MDF stages and the
// small delays that align the control signals. DEPTH = 0 is a plain wire.
// No reset: the contents are flushed by the data stream itself, so only the
// first DEPTH outputs after power-up are undefined. dout(t) = din(t - DEPTH).
module srl_delay #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_shift
    logic [WIDTH-1:0] sr [DEPTH];
    always_ff @(posedge clk) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
    assign dout = sr[DEPTH-1];
  end
endmodule
