// TOddOdd: odd-odd lifting rotation of the forward core transform, applied
// to the quadruple (10,11,14,15) of a 4x4 block.
//
//   d += a;  c -= b;  t1 = d >>> 1;  t2 = c >>> 1;  a -= t1;  b += t2
//   a += (3b + 4) >>> 3;  b -= (3a + 3) >>> 2;  a += (3b + 3) >>> 3
//   b -= t2;  a += t1;  c += b;  d -= a
//   outputs a, -b, -c, d
//
// Exactly invertible. The core transform diagram labels this quadruple's
// unit like the other two odd units; this design uses the odd-odd rotation
// that JPEG XR applies to this corner of the block. Purely combinational.
module t_oddodd
  import lbt_pkg::*;
(
  input  sample_t a_i, b_i, c_i, d_i,
  output sample_t a_o, b_o, c_o, d_o
);
  sample_t a, b, c, d, t1, t2;
  always_comb begin
    a = a_i; b = b_i; c = c_i; d = d_i;
    d  = d + a;
    c  = c - b;
    t1 = lift(d, 1, 0, 1);
    t2 = lift(c, 1, 0, 1);
    a  = a - t1;
    b  = b + t2;
    a  = a + lift(b, 3, 4, 3);
    b  = b - lift(a, 3, 3, 2);
    a  = a + lift(b, 3, 3, 3);
    b  = b - t2;
    a  = a + t1;
    c  = c + b;
    d  = d - a;
    a_o = a;
    b_o = -b;
    c_o = -c;
    d_o = d;
  end
endmodule
