// tb_mff_trivial: checks the MFF trivial-rotation stage at L = 32 (default)
// and L = 2 against an integer model of a radix-2 DIF stage.
//
// Both instances see the same continuous stream of random full-range complex
// samples on all four branches, with ctrl_s / ctrl_rot derived from the
// sample index. Output j must appear exactly L+2 cycles after input j and
// equal (A+B)/2 in the first half of each 2L block and (A-B)/2 in the
// second, multiplied by -j in the last quarter (A = older, B = newer sample).
module tb_mff_trivial;
  import fft_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 256;   // samples per branch

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t din [P];
  cplx_t dout_a [P], dout_b [P];
  logic  cs_a, cr_a, cs_b, cr_b;
  int xr [P][NS], xi [P][NS];
  int checks = 0, failures = 0, rot_seen = 0;

  mff_trivial                u_a (.clk, .din, .ctrl_s(cs_a), .ctrl_rot(cr_a), .dout(dout_a));
  mff_trivial #(.L(2))       u_b (.clk, .din, .ctrl_s(cs_b), .ctrl_rot(cr_b), .dout(dout_b));

  task automatic check_out(input int L, input int j, input cplx_t got [P]);
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
        ei = halve(xr[k][ib] - xr[k][ia]);
        rot_seen++;
      end
      checks++;
      if (int'(got[k].re) != er || int'(got[k].im) != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL L=%0d j=%0d k=%0d got (%0d,%0d) exp (%0d,%0d)",
                   L, j, k, got[k].re, got[k].im, er, ei);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < P; k++)
      for (int n = 0; n < NS; n++) begin
        xr[k][n] = int'($urandom_range(65535)) - 32768;
        xi[k][n] = int'($urandom_range(65535)) - 32768;
      end
    @(negedge clk);
    for (int c = 0; c < NS + 40; c++) begin
      if (c - 34 >= 0 && c - 34 < NS) check_out(32, c - 34, dout_a);
      if (c - 4 >= 0 && c - 4 < NS)   check_out(2, c - 4, dout_b);
      for (int k = 0; k < P; k++) begin
        din[k].re = (c < NS) ? W'(xr[k][c]) : '0;
        din[k].im = (c < NS) ? W'(xi[k][c]) : '0;
      end
      cs_a = c[5];  cr_a = !c[5] && c[4];
      cs_b = c[1];  cr_b = !c[1] && c[0];
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
