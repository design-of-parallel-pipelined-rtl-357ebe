// tb_mff_complex: checks the L = 1 MFF complex-rotation stage.
//
// Consecutive sample pairs (x[2m], x[2m+1]) must give (x[2m]+x[2m+1])/2 and
// (x[2m]-x[2m+1])/2, rotated by the twiddle offered 3 cycles after the input
// of the same index, and appear exactly 7 cycles after the input. Branch 0
// has no multiplier (ROT_MASK) and must pass the butterfly output unrotated
// with the same latency.
module tb_mff_complex;
  import fft_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 512;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t din [P], dout [P];
  coef_t cf [P];
  logic  cs;
  int xr [P][NS], xi [P][NS];
  int checks = 0, failures = 0;

  mff_complex u_dut (.clk, .din, .ctrl_s(cs), .coef(cf), .dout);

  task automatic check_out(input int j);
    for (int k = 0; k < P; k++) begin
      automatic int ia = j & ~1, ib = ia + 1;
      automatic int vr, vi, er, ei;
      if ((j & 1) == 0) begin
        vr = halve(xr[k][ia] + xr[k][ib]);
        vi = halve(xi[k][ia] + xi[k][ib]);
      end else begin
        vr = halve(xr[k][ia] - xr[k][ib]);
        vi = halve(xi[k][ia] - xi[k][ib]);
      end
      if (k == 0) begin
        er = vr;
        ei = vi;
      end else begin
        er = rot_re(vr, vi, coef_val(j, k, 0), coef_val(j, k, 1));
        ei = rot_im(vr, vi, coef_val(j, k, 0), coef_val(j, k, 1));
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
    @(negedge clk);
    for (int c = 0; c < NS + 10; c++) begin
      if (c - 7 >= 0 && c - 7 < NS) check_out(c - 7);
      for (int k = 0; k < P; k++) begin
        din[k].re = (c < NS) ? W'(xr[k][c]) : '0;
        din[k].im = (c < NS) ? W'(xi[k][c]) : '0;
        cf[k].c = CW'(coef_val(c - 3, k, 0));
        cf[k].s = CW'(coef_val(c - 3, k, 1));
      end
      cs = c[0];
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
