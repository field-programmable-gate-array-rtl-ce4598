// OPF_4x4: 4x4 overlap pre-filter, applied to a 4x4 area centred on the
// corner where four blocks meet. Samples x[0..15] are the area in row-major
// order (x[4*r + c]).
//
// Structure (follows the OPF 4x4 block diagram):
//   1. T2x2h Enc on (0,3,12,15), (1,2,13,14), (4,7,8,11), (5,6,9,10)
//   2. FWD Scale on (0,15), (1,14), (4,11), (5,10)
//      FWD Rotate on (13,12), (9,8), (7,3), (6,2)
//   3. T2x2h on the same four quadruples as step 1
// Both Hadamard stages round with R = 0. Purely combinational: the result is
// captured in register bank C through MUX C.
module opf_4x4
  import lbt_pkg::*;
(
  input  sample_t x_i [16],
  output sample_t y_o [16]
);
  sample_t s1 [16];   // after the first Hadamard stage
  sample_t s2 [16];   // after scale / rotate

  // Quadruples of the Hadamard stages.
  localparam int unsigned Q [4][4] = '{'{0, 3, 12, 15}, '{1, 2, 13, 14},
                                      '{4, 7, 8, 11}, '{5, 6, 9, 10}};
  // FWD Scale pairs and FWD Rotate pairs.
  localparam int unsigned SP [4][2] = '{'{0, 15}, '{1, 14}, '{4, 11}, '{5, 10}};
  localparam int unsigned RP [4][2] = '{'{13, 12}, '{9, 8}, '{7, 3}, '{6, 2}};

  for (genvar g = 0; g < 4; g++) begin : g_stage
    t2x2h #(.R(1'b0)) u_enc (
      .a_i(x_i[Q[g][0]]), .b_i(x_i[Q[g][1]]), .c_i(x_i[Q[g][2]]), .d_i(x_i[Q[g][3]]),
      .a_o(s1[Q[g][0]]),  .b_o(s1[Q[g][1]]),  .c_o(s1[Q[g][2]]),  .d_o(s1[Q[g][3]]));
    fwd_scale u_scale (
      .a_i(s1[SP[g][0]]), .b_i(s1[SP[g][1]]), .a_o(s2[SP[g][0]]), .b_o(s2[SP[g][1]]));
    fwd_rotate u_rot (
      .a_i(s1[RP[g][0]]), .b_i(s1[RP[g][1]]), .a_o(s2[RP[g][0]]), .b_o(s2[RP[g][1]]));
    t2x2h #(.R(1'b0)) u_had (
      .a_i(s2[Q[g][0]]), .b_i(s2[Q[g][1]]), .c_i(s2[Q[g][2]]), .d_i(s2[Q[g][3]]),
      .a_o(y_o[Q[g][0]]), .b_o(y_o[Q[g][1]]), .c_o(y_o[Q[g][2]]), .d_o(y_o[Q[g][3]]));
  end
endmodule
