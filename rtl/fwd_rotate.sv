// FWD Rotate: two-sample lifting rotation used inside the overlap
// pre-filters (OPF_4pt and OPF_4x4).
//
// Two lifting steps, each exactly invertible in integers:
//   b -= (a + 1) >>> 1
//   a += (b + 1) >>> 1
// The block name and where it sits come from the pre-filter block diagrams;
// the two lifting steps are this design's reading of the JPEG XR pre-filter
// rotation. Purely combinational, no clock.
module fwd_rotate
  import lbt_pkg::*;
(
  input  sample_t a_i,
  input  sample_t b_i,
  output sample_t a_o,
  output sample_t b_o
);
  sample_t b1;
  always_comb begin
    b1  = b_i - lift(a_i, 1, 1, 1);
    b_o = b1;
    a_o = a_i + lift(b1, 1, 1, 1);
  end
endmodule
