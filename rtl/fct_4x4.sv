// FCT_4x4: forward core transform of one 4x4 block. Samples x[0..15] are the
// block in row-major order (x[4*r + c]).
//
// Structure (follows the FCT block diagram):
//   1. T2x2h (R = 0) on (0,3,12,15), (5,6,9,10), (1,2,13,14), (4,7,8,11)
//   2. T2x2h (R = 1) on (0,1,4,5)      -> DC and low-frequency terms
//      TOdd on (2,3,6,7) and (8,12,9,13)
//      TOddOdd on (10,11,14,15)
//   3. FWD Permute: output k takes internal coefficient PERM[k],
//      PERM = 0,8,4,6, 2,10,14,12, 1,11,15,13, 9,3,7,5
// so y[0] is the block's DC coefficient. The permutation list is the one the
// diagram prints. Purely combinational: the result is captured in register
// bank C through MUX C.
module fct_4x4
  import lbt_pkg::*;
(
  input  sample_t x_i [16],
  output sample_t y_o [16]
);
  localparam int unsigned Q1 [4][4] = '{'{0, 3, 12, 15}, '{5, 6, 9, 10},
                                       '{1, 2, 13, 14}, '{4, 7, 8, 11}};
  localparam int unsigned PERM [16] = '{0, 8, 4, 6, 2, 10, 14, 12,
                                        1, 11, 15, 13, 9, 3, 7, 5};
  sample_t s1 [16];
  sample_t s2 [16];

  for (genvar g = 0; g < 4; g++) begin : g_stage1
    t2x2h #(.R(1'b0)) u_had (
      .a_i(x_i[Q1[g][0]]), .b_i(x_i[Q1[g][1]]), .c_i(x_i[Q1[g][2]]), .d_i(x_i[Q1[g][3]]),
      .a_o(s1[Q1[g][0]]),  .b_o(s1[Q1[g][1]]),  .c_o(s1[Q1[g][2]]),  .d_o(s1[Q1[g][3]]));
  end

  t2x2h #(.R(1'b1)) u_dc (
    .a_i(s1[0]), .b_i(s1[1]), .c_i(s1[4]), .d_i(s1[5]),
    .a_o(s2[0]), .b_o(s2[1]), .c_o(s2[4]), .d_o(s2[5]));
  t_odd u_odd_a (
    .a_i(s1[2]), .b_i(s1[3]), .c_i(s1[6]), .d_i(s1[7]),
    .a_o(s2[2]), .b_o(s2[3]), .c_o(s2[6]), .d_o(s2[7]));
  t_odd u_odd_b (
    .a_i(s1[8]), .b_i(s1[12]), .c_i(s1[9]), .d_i(s1[13]),
    .a_o(s2[8]), .b_o(s2[12]), .c_o(s2[9]), .d_o(s2[13]));
  t_oddodd u_oddodd (
    .a_i(s1[10]), .b_i(s1[11]), .c_i(s1[14]), .d_i(s1[15]),
    .a_o(s2[10]), .b_o(s2[11]), .c_o(s2[14]), .d_o(s2[15]));

  always_comb
    for (int k = 0; k < 16; k++) y_o[k] = s2[PERM[k]];
endmodule
