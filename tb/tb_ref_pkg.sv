// tb_ref_pkg: integer reference arithmetic for the stage testbenches.
//
// Written independently of the RTL: plain integer arithmetic where the
// RTL uses bit slices. halve() is the butterfly's divide-by-2 (floor),
// sat16() the saturation to 16 bits and rot_re()/rot_im() the complex
// multiplication by a coefficient with 14 fractional bits, floored.
package tb_ref_pkg;
  function automatic int halve(input int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  function automatic int sat16(input int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic int floor_div(input longint v, input longint d);
    longint q;
    q = v / d;
    if ((v % d != 0) && (v < 0)) q = q - 1;
    return int'(q);
  endfunction

  function automatic int rot_re(input int x, input int y, input int c, input int s);
    return sat16(floor_div(longint'(x) * c - longint'(y) * s, 16384));
  endfunction

  function automatic int rot_im(input int x, input int y, input int c, input int s);
    return sat16(floor_div(longint'(x) * s + longint'(y) * c, 16384));
  endfunction

  // pseudo-random but reproducible coefficient for output j of branch k
  function automatic int coef_val(input int j, input int k, input int part);
    int h;
    h = (j * 7919 + k * 104729 + part * 1299709) % 32769;
    return h - 16384;
  endfunction
endpackage
