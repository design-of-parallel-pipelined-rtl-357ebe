// last_stages: stages 9 and 10 of the FFT, which combine the four parallel
// branches without any buffer.
//
// Branch k carries the index bits b1,b0 = (k[0], k[1]), so stage 9 (pairs
// differing in b1) combines branches 0/1 and 2/3, and stage 10 (pairs
// differing in b0) combines branches 0/2 and 1/3. Between them the trivial
// rotation by -j applies to the datum with b1 = b0 = 1, the difference output
// of the 2/3 butterfly. Each stage ends in a register: 1 cycle per stage,
// 2 cycles in all. Outputs are halved (truncation) in both butterflies and
// the negation saturates: this implementation's choices.
module last_stages
  import fft_pkg::*;
(
  input  logic  clk,
  input  cplx_t din  [P],
  output cplx_t dout [P]
);
  cplx_t s9 [P];

  function automatic cplx_t bf_add(input cplx_t a, input cplx_t b);
    bf_add.re = half_add(a.re, b.re);
    bf_add.im = half_add(a.im, b.im);
  endfunction

  function automatic cplx_t bf_sub(input cplx_t a, input cplx_t b);
    bf_sub.re = half_sub(a.re, b.re);
    bf_sub.im = half_sub(a.im, b.im);
  endfunction

  // (a - b) * (-j)
  function automatic cplx_t bf_sub_mj(input cplx_t a, input cplx_t b);
    cplx_t d;
    d = bf_sub(a, b);
    bf_sub_mj.re = d.im;
    bf_sub_mj.im = sat(-(W+2)'(d.re));
  endfunction

  always_ff @(posedge clk) begin
    // stage 9
    s9[0] <= bf_add(din[0], din[1]);
    s9[1] <= bf_sub(din[0], din[1]);
    s9[2] <= bf_add(din[2], din[3]);
    s9[3] <= bf_sub_mj(din[2], din[3]);
    // stage 10
    dout[0] <= bf_add(s9[0], s9[2]);
    dout[2] <= bf_sub(s9[0], s9[2]);
    dout[1] <= bf_add(s9[1], s9[3]);
    dout[3] <= bf_sub(s9[1], s9[3]);
  end
endmodule
