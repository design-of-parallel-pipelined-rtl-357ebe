// tb_bram_buffer: checks that the shared RAM buffer is an exact L-cycle delay
// when its address steps through 0..L-1, at L = 128 (stage 1 size, 64-bit
// words) and L = 64 (stage 2 size).
module tb_bram_buffer;
  localparam int NS = 600;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] din, dout_a, dout_b;
  logic [6:0]  addr_a;
  logic [5:0]  addr_b;
  logic [63:0] hist [NS];
  int checks = 0, failures = 0;

  bram_buffer               u_a (.clk, .addr(addr_a), .din, .dout(dout_a));
  bram_buffer #(.L(64))     u_b (.clk, .addr(addr_b), .din, .dout(dout_b));

  initial begin
    @(negedge clk);
    for (int c = 0; c < NS; c++) begin
      if (c >= 128) begin
        checks++;
        if (dout_a !== hist[c - 128]) begin
          failures++;
          if (failures < 10) $display("FAIL L=128 c=%0d got %h exp %h", c, dout_a, hist[c - 128]);
        end
      end
      if (c >= 64) begin
        checks++;
        if (dout_b !== hist[c - 64]) begin
          failures++;
          if (failures < 10) $display("FAIL L=64 c=%0d got %h exp %h", c, dout_b, hist[c - 64]);
        end
      end
      hist[c] = {$urandom, $urandom};
      din = hist[c];
      addr_a = 7'(c);
      addr_b = 6'(c);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
