// tb_coef_rom: reads every address of the ROM of each complex stage (stage 2,
// stage 4 branch 2, stage 6, stage 8 branch 3) and compares it with
// W_1024^phi computed here from the twiddle exponents of the radix-2^4
// algorithm, taking the content rotation into account. One register of read
// latency is expected.
module tb_coef_rom;
  import fft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a2, a6, a8;
  logic [7:0] a4;
  coef_t d2, d4, d6, d8;
  int checks = 0, failures = 0;

  localparam int R2 = 12, R4 = 251, R6 = 15, R8 = 10;

  coef_rom #(.STAGE(2), .BRANCH(0), .ROT(R2)) u2 (.clk, .addr(a2), .dout(d2));
  coef_rom #(.STAGE(4), .BRANCH(2), .ROT(R4)) u4 (.clk, .addr(a4), .dout(d4));
  coef_rom #(.STAGE(6), .BRANCH(0), .ROT(R6)) u6 (.clk, .addr(a6), .dout(d6));
  coef_rom #(.STAGE(8), .BRANCH(3), .ROT(R8)) u8 (.clk, .addr(a8), .dout(d8));

  function automatic int b(input int v, input int i);
    return (v >> i) & 1;
  endfunction

  task automatic expect_tw(input string nm, input int ph, input coef_t got);
    automatic real ang = 2.0 * 3.14159265358979323846 * ph / 1024.0;
    automatic int ec = $rtoi($floor(16384.0 * $cos(ang) + 0.5));
    automatic int es = $rtoi($floor(-16384.0 * $sin(ang) + 0.5));
    automatic int dc = int'(got.c) - ec, ds = int'(got.s) - es;
    checks++;
    if (dc > 1 || dc < -1 || ds > 1 || ds < -1) begin
      failures++;
      if (failures < 10) $display("FAIL %s phi=%0d got (%0d,%0d) exp (%0d,%0d)", nm, ph, got.c, got.s, ec, es);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a <= 256; a++) begin
      if (a > 0) begin
        automatic int p = a - 1;
        if (p < 16) begin
          // stage 2: entry q = b9 b8 b7 b6
          automatic int q = (p - R2 + 16) % 16;
          automatic int i = q << 6;
          expect_tw("st2", (2 * b(i,8) + b(i,9)) * (128 * b(i,7) + 64 * b(i,6)), d2);
          // stage 6: entry q = b5 b4 b3 b2
          q = (p - R6 + 16) % 16;
          i = q << 2;
          expect_tw("st6", (32 * b(i,4) + 16 * b(i,5)) * (8 * b(i,3) + 4 * b(i,2)), d6);
          // stage 8, branch 3: b1 = b0 = 1
          q = (p - R8 + 16) % 16;
          i = (q << 2) | 3;
          expect_tw("st8", (128 * b(i,2) + 64 * b(i,3) + 32 * b(i,4) + 16 * b(i,5)) * 3, d8);
        end
        begin
          // stage 4, branch 2: b1 = 0, b0 = 1
          automatic int q = (p - R4 + 256) % 256;
          automatic int i = (q << 2) | 1;
          expect_tw("st4", (8 * b(i,6) + 4 * b(i,7) + 2 * b(i,8) + b(i,9)) * (i & 63), d4);
        end
      end
      a2 = 4'(a); a6 = 4'(a); a8 = 4'(a); a4 = 8'(a);
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
