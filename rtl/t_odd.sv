// TOdd: odd-part lifting rotation of the forward core transform, applied to
// the quadruples (2,3,6,7) and (8,12,9,13) of a 4x4 block.
//
//   b -= c;  a += d;  c += (b + 1) >>> 1;  d = ((a + 1) >>> 1) - d
//   b -= (3a + 4) >>> 3;  a += (3b + 4) >>> 3      (rotation of a, b)
//   d -= (3c + 4) >>> 3;  c += (3d + 4) >>> 3      (rotation of c, d)
//   d += b >>> 1;  c -= (a + 1) >>> 1;  b -= d;  a += c
//
// Every step is an integer lifting step, so the transform is exactly
// invertible. The block name and the samples it takes come from the core
// transform diagram; the steps are this design's reading of JPEG XR.
// Purely combinational.
module t_odd
  import lbt_pkg::*;
(
  input  sample_t a_i, b_i, c_i, d_i,
  output sample_t a_o, b_o, c_o, d_o
);
  sample_t a, b, c, d;
  always_comb begin
    a = a_i; b = b_i; c = c_i; d = d_i;
    b = b - c;
    a = a + d;
    c = c + lift(b, 1, 1, 1);
    d = lift(a, 1, 1, 1) - d;
    b = b - lift(a, 3, 4, 3);
    a = a + lift(b, 3, 4, 3);
    d = d - lift(c, 3, 4, 3);
    c = c + lift(d, 3, 4, 3);
    d = d + lift(b, 1, 0, 1);
    c = c - lift(a, 1, 1, 1);
    b = b - d;
    a = a + c;
    a_o = a; b_o = b; c_o = c; d_o = d;
  end
endmodule
