// tb_fft_ctrl: checks the controller cycle by cycle after reset against the
// stage start times 0, 130, 200, 234, 256, 266, 276, 280 and the total
// latency 289: ctrl_s of stage s must equal bit log2(L) of the index of the
// sample at that stage's input, ctrl_rot of the trivial stages must be high
// in the last quarter of each 2L period, the RAM addresses must be the
// counter's low bits, the ROM addresses must select twiddle entry j one cycle
// before a complex stage uses it, and dout_valid / dout_t must start at 289.
module tb_fft_ctrl;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1;
  logic [8:1] ctrl_s;
  logic [3:0] ctrl_rot;
  logic [6:0] ram_addr1;
  logic [5:0] ram_addr2;
  logic [3:0] rom_addr2, rom_addr6, rom_addr8;
  logic [7:0] rom_addr4;
  logic dout_valid;
  logic [7:0] dout_t;
  int checks = 0, failures = 0;

  int start [1:8] = '{0, 130, 200, 234, 256, 266, 276, 280};
  int lb    [1:8] = '{7, 6, 5, 4, 3, 2, 1, 0};

  fft_ctrl u_dut (.clk, .rst, .ctrl_s, .ctrl_rot, .ram_addr1, .ram_addr2,
                  .rom_addr2, .rom_addr4, .rom_addr6, .rom_addr8, .dout_valid, .dout_t);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 1200; c++) begin
      for (int s = 1; s <= 8; s++) begin
        automatic int loc = c - start[s];
        if (loc >= 0) begin
          chk(ctrl_s[s] == ((loc >> lb[s]) & 1), $sformatf("c=%0d ctrl_s[%0d]", c, s));
          if (s % 2 == 1)
            chk(ctrl_rot[s / 2] == (!((loc >> lb[s]) & 1) && ((loc >> (lb[s] - 1)) & 1)),
                $sformatf("c=%0d ctrl_rot[%0d]", c, s));
        end
      end
      chk(ram_addr1 == 7'(c) && ram_addr2 == 6'(c), $sformatf("c=%0d RAM addresses", c));
      // complex stage s reads entry of output j at cycle start+L+1+j
      if (c >= 195) chk(rom_addr2 == 4'(((c - 195) >> 4) % 16), $sformatf("c=%0d rom2", c));
      if (c >= 251) chk(rom_addr4 == 8'(((c - 251) + 251) % 256), $sformatf("c=%0d rom4", c));
      if (c >= 271) chk(rom_addr6 == 4'(((c - 271) + 15) % 16), $sformatf("c=%0d rom6", c));
      if (c >= 282) chk(rom_addr8 == 4'(((c - 282) + 10) % 16), $sformatf("c=%0d rom8", c));
      chk(dout_valid == (c >= 289), $sformatf("c=%0d dout_valid", c));
      if (c >= 289) chk(dout_t == 8'(c - 289), $sformatf("c=%0d dout_t", c));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
