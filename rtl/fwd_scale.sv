// FWD Scale: two-sample lifting scaling used inside the overlap pre-filters
// (OPF_4pt and OPF_4x4).
//
// A chain of integer lifting steps, each exactly invertible:
//   b -= (a + 2) >>> 2
//   a -= (b + 1) >>> 1
//   a -= b >>> 5;  a -= b >>> 9;  a -= b >>> 13
//   b -= (a + 2) >>> 2
// The block name and position come from the pre-filter block diagrams; the
// steps are this design's reading of the JPEG XR pre-filter scaling stage.
// Purely combinational.
module fwd_scale
  import lbt_pkg::*;
(
  input  sample_t a_i,
  input  sample_t b_i,
  output sample_t a_o,
  output sample_t b_o
);
  sample_t a1, b1;
  always_comb begin
    b1  = b_i - lift(a_i, 1, 2, 2);
    a1  = a_i - lift(b1, 1, 1, 1);
    a1  = a1 - lift(b1, 1, 0, 5);
    a1  = a1 - lift(b1, 1, 0, 9);
    a1  = a1 - lift(b1, 1, 0, 13);
    a_o = a1;
    b_o = b1 - lift(a1, 1, 2, 2);
  end
endmodule
