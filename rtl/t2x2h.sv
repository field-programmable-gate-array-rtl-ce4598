// T2x2h: 2x2 Hadamard transform of four samples, realised with integer
// lifting so that it is exactly invertible (applying it twice with the same
// rounding returns the input).
//
//   a += d;  b -= c
//   t  = (a - b + R) >>> 1
//   c' = t - d;  d' = t - c
//   a -= d';  b += c'
//
// R (0 or 1) is the rounding offset, a parameter. The pre-filter uses R = 0
// everywhere ("T2x2h Enc" and "T2x2h" in its diagram); the core transform
// uses R = 0 in its first stage and R = 1 for the DC/low-pass quadruple. The
// block name is the document's; the lifting steps are this design's reading
// of the JPEG XR Hadamard stage. Purely combinational.
module t2x2h
  import lbt_pkg::*;
#(
  parameter bit R = 1'b0
) (
  input  sample_t a_i, b_i, c_i, d_i,
  output sample_t a_o, b_o, c_o, d_o
);
  sample_t a1, b1, t, c1, d1;
  always_comb begin
    a1  = a_i + d_i;
    b1  = b_i - c_i;
    t   = lift(sample_t'(a1 - b1), 1, {2'b00, R}, 1);
    c1  = t - d_i;
    d1  = t - c_i;
    a_o = a1 - d1;
    b_o = b1 + c1;
    c_o = c1;
    d_o = d1;
  end
endmodule
