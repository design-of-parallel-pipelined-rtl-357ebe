// tb_fft1024_mdf_mff: end-to-end test of the 1024-point 4-parallel FFT at its
// full size (the top has no parameters).
//
// Feeds NF back-to-back frames (random full-range data, a single tone and an
// impulse) in the 4-parallel input order, then compares every output sample
// with a double-precision DFT of the same frame divided by 1024, allowing a
// few LSBs for the truncations of the fixed-point datapath. It also checks
// that the first output appears exactly 289 cycles after the first input,
// that the output time index dout_t follows the frame, and counts how often
// each control mechanism of the design was exercised: the butterfly sum and
// difference phases of every stage and the trivial -j rotations of stages
// 1, 3, 5 and 7. A watchdog ends the run if outputs stop.
module tb_fft1024_mdf_mff;
  import fft_pkg::*;

  localparam int NF  = 4;
  localparam int TOL = 6;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  cplx_t din  [P];
  cplx_t dout [P];
  logic  dout_valid;
  logic [7:0] dout_t;

  int checks = 0, failures = 0;
  int xr [NF][N], xi [NF][N];
  real ref_re [NF][N], ref_im [NF][N];
  real cs [N], sn [N];
  int  cyc = 0, first_valid = -1, outs = 0;
  int  max_err = 0;
  int  n_sum [1:8], n_diff [1:8], n_rot [1:8];

  fft1024_mdf_mff dut (.clk, .rst, .din, .dout, .dout_valid, .dout_t);

  always #5 clk = ~clk;

  function automatic int bitrev10(input int v);
    int r = 0;
    for (int i = 0; i < 10; i++) r |= ((v >> i) & 1) << (9 - i);
    return r;
  endfunction

  function automatic int rbr(input int k);   // index bits b1b0 of branch k
    return ((k & 1) << 1) | ((k >> 1) & 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      cs[i] = $cos(2.0 * 3.14159265358979323846 * i / N);
      sn[i] = -$sin(2.0 * 3.14159265358979323846 * i / N);
    end
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        case (f)
          1: begin   // tone in bin 37
               xr[f][n] = $rtoi(12000.0 * cs[(37*n) % N]);
               xi[f][n] = $rtoi(12000.0 * -sn[(37*n) % N]);
             end
          2: begin   // impulse at n = 5
               xr[f][n] = (n == 5) ? 20000 : 0;
               xi[f][n] = (n == 5) ? -7000 : 0;
             end
          default: begin
               xr[f][n] = int'($urandom_range(32000)) - 16000;
               xi[f][n] = int'($urandom_range(32000)) - 16000;
             end
        endcase
      end
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < N; k++) begin
        automatic real ar = 0.0, ai = 0.0;
        for (int n = 0; n < N; n++) begin
          automatic int e = (n * k) % N;
          ar += xr[f][n] * cs[e] - xi[f][n] * sn[e];
          ai += xr[f][n] * sn[e] + xi[f][n] * cs[e];
        end
        ref_re[f][k] = ar / N;
        ref_im[f][k] = ai / N;
      end
  end

  // stimulus: frames back to back from the first cycle after reset
  initial begin
    for (int k = 0; k < P; k++) din[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < NF * FRAME; c++) begin
      for (int k = 0; k < P; k++) begin
        automatic int n = 4 * (c % FRAME) + rbr(k);
        din[k].re = W'(xr[c / FRAME][n]);
        din[k].im = W'(xi[c / FRAME][n]);
      end
      @(negedge clk);
    end
    for (int k = 0; k < P; k++) din[k] = '0;
  end

  // response check
  always @(posedge clk) if (!rst) begin
    cyc++;
    for (int s = 1; s <= 8; s++) begin
      if (dut.ctrl_s[s]) n_sum[s]++; else n_diff[s]++;
      if (s % 2 == 1 && dut.ctrl_rot[s / 2]) n_rot[s]++;
    end
    if (dout_valid) begin
      automatic int f, t;
      if (first_valid < 0) begin
        first_valid = cyc - 1;
        check(first_valid == 289, $sformatf("latency %0d, expected 289", first_valid));
      end
      f = outs / FRAME;
      t = outs % FRAME;
      if (f < NF) begin
        check(dout_t == 8'(t), $sformatf("dout_t %0d expected %0d", dout_t, t));
        for (int k = 0; k < P; k++) begin
          automatic int kk = bitrev10(4 * t + rbr(k));
          automatic int er = $rtoi($floor(ref_re[f][kk] + 0.5));
          automatic int ei = $rtoi($floor(ref_im[f][kk] + 0.5));
          automatic int dr = int'(dout[k].re) - er;
          automatic int di = int'(dout[k].im) - ei;
          if (dr < 0) dr = -dr;
          if (di < 0) di = -di;
          if (dr > max_err) max_err = dr;
          if (di > max_err) max_err = di;
          check(dr <= TOL && di <= TOL,
                $sformatf("frame %0d X[%0d] = (%0d,%0d), expected (%0d,%0d)",
                          f, kk, dout[k].re, dout[k].im, er, ei));
        end
      end
      outs++;
      if (outs == NF * FRAME) begin
        for (int s = 1; s <= 8; s++) begin
          check(n_sum[s] > 0 && n_diff[s] > 0, $sformatf("stage %0d: both butterfly phases", s));
          if (s % 2 == 1)
            check(n_rot[s] > 0, $sformatf("stage %0d: trivial rotation never used", s));
        end
        $display("latency %0d cycles, max error %0d LSB, %0d frames", first_valid, max_err, NF);
        $display("rotation cycles st1=%0d st3=%0d st5=%0d st7=%0d", n_rot[1], n_rot[3], n_rot[5], n_rot[7]);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    for (int s = 1; s <= 8; s++) begin n_sum[s] = 0; n_diff[s] = 0; n_rot[s] = 0; end
    repeat (NF * FRAME + 1000) @(posedge clk);
    failures++;
    $display("watchdog: only %0d outputs", outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
