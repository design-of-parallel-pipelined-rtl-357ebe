// tb_mdf_trivial: checks the MDF trivial-rotation stage with its shared
// block-RAM buffer at the default L = 128 against an integer model.
//
// A continuous stream of random full-range samples enters all four
// branches; ctrl_s, ctrl_rot and the RAM address come from the sample index.
// Output j must appear exactly L+2 cycles after input j: (A+B)/2 in the
// first half of each 2L block, (A-B)/2 in the second, times -j in its last
// quarter (negation saturating).
module tb_mdf_trivial;
  import fft_pkg::*;
  import tb_ref_pkg::*;

  localparam int L  = 128;
  localparam int NS = 1024;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t din [P], dout [P];
  logic  cs, cr;
  logic [6:0] addr;
  int xr [P][NS], xi [P][NS];
  int checks = 0, failures = 0, rot_seen = 0;

  mdf_trivial u_dut (.clk, .din, .ctrl_s(cs), .ctrl_rot(cr), .ram_addr(addr), .dout);

  task automatic check_out(input int j);
    for (int k = 0; k < P; k++) begin
      automatic int blk = j / (2 * L), ph = j % (2 * L);
      automatic int ia = blk * 2 * L + (ph % L), ib = ia + L;
      automatic int er, ei;
      if (ph < L) begin
        er = halve(xr[k][ia] + xr[k][ib]);
        ei = halve(xi[k][ia] + xi[k][ib]);
      end else if (ph < L + L / 2) begin
        er = halve(xr[k][ia] - xr[k][ib]);
        ei = halve(xi[k][ia] - xi[k][ib]);
      end else begin
        er = halve(xi[k][ia] - xi[k][ib]);
        ei = sat16(-halve(xr[k][ia] - xr[k][ib]));
        rot_seen++;
      end
      checks++;
      if (int'(dout[k].re) != er || int'(dout[k].im) != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL j=%0d k=%0d got (%0d,%0d) exp (%0d,%0d)",
                   j, k, dout[k].re, dout[k].im, er, ei);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < P; k++)
      for (int n = 0; n < NS; n++) begin
        xr[k][n] = int'($urandom_range(65535)) - 32768;
        xi[k][n] = int'($urandom_range(65535)) - 32768;
      end
    // corner: A = -32768, B = 32767 makes the rotated value saturate
    xr[1][256 + 100] = -32768;
    xr[1][256 + 228] = 32767;
    @(negedge clk);
    for (int c = 0; c < NS + L + 4; c++) begin
      if (c - (L + 2) >= 0 && c - (L + 2) < NS) check_out(c - (L + 2));
      for (int k = 0; k < P; k++) begin
        din[k].re = (c < NS) ? W'(xr[k][c]) : '0;
        din[k].im = (c < NS) ? W'(xi[k][c]) : '0;
      end
      cs = c[7];  cr = !c[7] && c[6];
      addr = c[6:0];
      @(negedge clk);
    end
    if (rot_seen == 0) failures++;
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
