// OPF_4pt: 4-point overlap pre-filter, applied to each row of a 2x4 area and
// each column of a 4x2 area that straddles a block boundary on the edge of
// the tile. a..d are four consecutive samples; the block boundary lies
// between b and c.
//
// Dataflow (follows the OPF 4pt block diagram):
//   a = A + D;  b = B + C
//   d = D - ((a + 1) >>> 1);  c = C - ((b + 1) >>> 1)
//   (c, d) = FWD Rotate(c, d);  c = -c;  d = -d
//   a -= d;  b -= c
//   d += a >>> 1;  c += b >>> 1
//   a -= (3d + 4) >>> 3;  b -= (3c + 4) >>> 3
//   (a, d) = FWD Scale(a, d);  (b, c) = FWD Scale(b, c)
//   d += (a + 1) >>> 1;  c += (b + 1) >>> 1
//   a -= d;  b -= c
// The diagram prints the halving steps as shift boxes; they are arithmetic
// right shifts here, as the JPEG XR filter needs. Purely combinational: the
// result is captured in register bank B one clock after bank A is full.
module opf_4pt
  import lbt_pkg::*;
(
  input  sample_t x_i [4],
  output sample_t y_o [4]
);
  sample_t a0, b0, c0, d0;       // after the first butterfly
  sample_t cr, dr;               // FWD Rotate outputs
  sample_t a1, b1, c1, d1;       // before FWD Scale
  sample_t as, bs, cs, ds;       // FWD Scale outputs

  always_comb begin
    a0 = x_i[0] + x_i[3];
    b0 = x_i[1] + x_i[2];
    d0 = x_i[3] - lift(a0, 1, 1, 1);
    c0 = x_i[2] - lift(b0, 1, 1, 1);
  end

  fwd_rotate u_rot (.a_i(c0), .b_i(d0), .a_o(cr), .b_o(dr));

  always_comb begin
    c1 = -cr;
    d1 = -dr;
    a1 = a0 - d1;
    b1 = b0 - c1;
    d1 = d1 + lift(a1, 1, 0, 1);
    c1 = c1 + lift(b1, 1, 0, 1);
    a1 = a1 - lift(d1, 3, 4, 3);
    b1 = b1 - lift(c1, 3, 4, 3);
  end

  fwd_scale u_scale_ad (.a_i(a1), .b_i(d1), .a_o(as), .b_o(ds));
  fwd_scale u_scale_bc (.a_i(b1), .b_i(c1), .a_o(bs), .b_o(cs));

  sample_t d2, c2;
  always_comb begin
    d2 = ds + lift(as, 1, 1, 1);
    c2 = cs + lift(bs, 1, 1, 1);
    y_o[0] = as - d2;
    y_o[1] = bs - c2;
    y_o[2] = c2;
    y_o[3] = d2;
  end
endmodule
