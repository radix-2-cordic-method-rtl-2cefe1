// tb_cordic_ref_pkg: independent software model of the CORDIC datapath for
// the testbenches.
//
// Works on longint values holding signed WIDTH-bit words. The angle table
// comes from the simulator's $atan, not from the RTL's series, and the
// shift is written as a floor division, not with >>>, so the model shares
// no code with the design. rotate() runs the full rotation-mode iteration
// (d = +1 for z >= 0, else -1), or vectoring mode (d = +1 for y < 0,
// else -1), with wrap to WIDTH bits after every step.
package tb_cordic_ref_pkg;

  // Sign-extend the low w bits of v.
  function automatic longint wrap(longint v, int w);
    longint m;
    m = (longint'(1) <<< w) - 1;
    v = v & m;
    if (v >= (longint'(1) <<< (w - 1))) v = v - (longint'(1) <<< w);
    return v;
  endfunction

  // floor(v / 2^s)
  function automatic longint floor_shift(longint v, int s);
    for (int k = 0; k < s; k++) begin
      if (v % 2 != 0 && v < 0) v = (v - 1) / 2;
      else                     v = v / 2;
    end
    return v;
  endfunction

  // round(atan(2^-i) * 2^fbits)
  function automatic longint ref_atan(int i, int fbits);
    real r;
    r = $atan($pow(2.0, -real'(i))) * $pow(2.0, real'(fbits));
    return longint'($floor(r + 0.5));
  endfunction

  // One stage i; vec selects vectoring mode (d from the sign of y).
  function automatic void step(int w, int i, inout longint x, inout longint y,
                               inout longint z, input bit vec = 1'b0);
    bit d_pos;
    longint xs, ys, a;
    xs = floor_shift(x, i);
    ys = floor_shift(y, i);
    a  = ref_atan(i, w - 2);
    d_pos = vec ? (y < 0) : (z >= 0);
    if (d_pos) begin
      x = wrap(x - ys, w); y = wrap(y + xs, w); z = wrap(z - a, w);
    end else begin
      x = wrap(x + ys, w); y = wrap(y - xs, w); z = wrap(z + a, w);
    end
  endfunction

  // All stages 0 .. stages-1.
  function automatic void rotate(int w, int stages, inout longint x,
                                 inout longint y, inout longint z,
                                 input bit vec = 1'b0);
    for (int i = 0; i < stages; i++) step(w, i, x, y, z, vec);
  endfunction

  // 1/An for the given stage count, in the fixed-point format.
  function automatic longint inv_gain(int w, int stages);
    real g;
    g = 1.0;
    for (int i = 0; i < stages; i++) g = g * $sqrt(1.0 + $pow(2.0, -2.0 * i));
    return longint'($floor($pow(2.0, real'(w - 2)) / g + 0.5));
  endfunction

endpackage
