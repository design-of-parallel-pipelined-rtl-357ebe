// tb_mdf_complex: checks the MDF complex-rotation stage in both buffer
// forms: the default L = 64 with the shared block RAM, and L = 4 with shift
// registers.
//
// Random full-range samples stream into all four branches; each branch gets
// its own pseudo-random twiddle per output, offered L+2 cycles after the
// input of the same index, as the stage expects. The reference is the
// radix-2 butterfly with halving, followed by the fixed-point rotation
// X = (xC - yS) / 2^14, Y = (xS + yC) / 2^14, floored and saturated. Output j
// must appear exactly L+6 cycles after input j.
module tb_mdf_complex;
  import fft_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 512;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t din [P], dout_a [P], dout_b [P];
  coef_t cf_a [P], cf_b [P];
  logic  cs_a, cs_b;
  logic [5:0] addr_a;
  int xr [P][NS], xi [P][NS];
  int checks = 0, failures = 0, sat_seen = 0;

  mdf_complex                          u_a (.clk, .din, .ctrl_s(cs_a), .ram_addr(addr_a),
                                            .coef(cf_a), .dout(dout_a));
  mdf_complex #(.L(4), .USE_RAM(1'b0)) u_b (.clk, .din, .ctrl_s(cs_b), .ram_addr(2'b0),
                                            .coef(cf_b), .dout(dout_b));

  task automatic check_out(input int L, input int j, input cplx_t got [P]);
    for (int k = 0; k < P; k++) begin
      automatic int blk = j / (2 * L), ph = j % (2 * L);
      automatic int ia = blk * 2 * L + (ph % L), ib = ia + L;
      automatic int vr, vi, er, ei;
      if (ph < L) begin
        vr = halve(xr[k][ia] + xr[k][ib]);
        vi = halve(xi[k][ia] + xi[k][ib]);
      end else begin
        vr = halve(xr[k][ia] - xr[k][ib]);
        vi = halve(xi[k][ia] - xi[k][ib]);
      end
      er = rot_re(vr, vi, coef_val(j, k, 0), coef_val(j, k, 1));
      ei = rot_im(vr, vi, coef_val(j, k, 0), coef_val(j, k, 1));
      if (er == 32767 || er == -32768) sat_seen++;
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
    for (int c = 0; c < NS + 80; c++) begin
      if (c - 70 >= 0 && c - 70 < NS) check_out(64, c - 70, dout_a);
      if (c - 10 >= 0 && c - 10 < NS) check_out(4, c - 10, dout_b);
      for (int k = 0; k < P; k++) begin
        din[k].re = (c < NS) ? W'(xr[k][c]) : '0;
        din[k].im = (c < NS) ? W'(xi[k][c]) : '0;
        cf_a[k].c = CW'(coef_val(c - 66, k, 0));
        cf_a[k].s = CW'(coef_val(c - 66, k, 1));
        cf_b[k].c = CW'(coef_val(c - 6, k, 0));
        cf_b[k].s = CW'(coef_val(c - 6, k, 1));
      end
      cs_a = c[6];
      cs_b = c[2];
      addr_a = c[5:0];
      @(negedge clk);
    end
    $display("saturated outputs: %0d", sat_seen);
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
