// tb_last_stages: checks stages 9 and 10 with random full-range inputs:
// butterflies 0/1 and 2/3, -j on the 2/3 difference, then butterflies 0/2
// and 1/3, all halved, with a latency of exactly 2 cycles.
module tb_last_stages;
  import fft_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t din [P], dout [P];
  int xr [NS][P], xi [NS][P];
  int checks = 0, failures = 0;

  last_stages u_dut (.clk, .din, .dout);

  initial begin
    @(negedge clk);
    for (int c = 0; c < NS + 2; c++) begin
      if (c >= 2) begin
        automatic int j = c - 2;
        automatic int ar [P], ai [P], er [P], ei [P];
        ar[0] = halve(xr[j][0] + xr[j][1]);  ai[0] = halve(xi[j][0] + xi[j][1]);
        ar[1] = halve(xr[j][0] - xr[j][1]);  ai[1] = halve(xi[j][0] - xi[j][1]);
        ar[2] = halve(xr[j][2] + xr[j][3]);  ai[2] = halve(xi[j][2] + xi[j][3]);
        ar[3] = halve(xi[j][2] - xi[j][3]);  ai[3] = sat16(-halve(xr[j][2] - xr[j][3]));
        er[0] = halve(ar[0] + ar[2]);  ei[0] = halve(ai[0] + ai[2]);
        er[2] = halve(ar[0] - ar[2]);  ei[2] = halve(ai[0] - ai[2]);
        er[1] = halve(ar[1] + ar[3]);  ei[1] = halve(ai[1] + ai[3]);
        er[3] = halve(ar[1] - ar[3]);  ei[3] = halve(ai[1] - ai[3]);
        for (int k = 0; k < P; k++) begin
          checks++;
          if (int'(dout[k].re) != er[k] || int'(dout[k].im) != ei[k]) begin
            failures++;
            if (failures < 10) $display("FAIL j=%0d k=%0d got (%0d,%0d) exp (%0d,%0d)",
                                        j, k, dout[k].re, dout[k].im, er[k], ei[k]);
          end
        end
      end
      for (int k = 0; k < P; k++) begin
        if (c < NS) begin
          xr[c][k] = int'($urandom_range(65535)) - 32768;
          xi[c][k] = int'($urandom_range(65535)) - 32768;
          din[k].re = W'(xr[c][k]);
          din[k].im = W'(xi[c][k]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
