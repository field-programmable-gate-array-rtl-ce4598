// Testbench for t2x2h: both rounding variants (R = 0 and R = 1) are compared
// with the integer reference model on random quadruples, and a second copy
// of each, fed with the first one's outputs, must return the original
// inputs (the 2x2 Hadamard lifting is its own inverse). Combinational.
module tb_t2x2h;
  import lbt_pkg::*;
  import lbt_ref_pkg::*;
  int checks = 0, failures = 0;
  sample_t x [4];
  sample_t y0 [4], y1 [4], z0 [4], z1 [4];

  t2x2h #(.R(1'b0)) dut0 (.a_i(x[0]), .b_i(x[1]), .c_i(x[2]), .d_i(x[3]),
                          .a_o(y0[0]), .b_o(y0[1]), .c_o(y0[2]), .d_o(y0[3]));
  t2x2h #(.R(1'b1)) dut1 (.a_i(x[0]), .b_i(x[1]), .c_i(x[2]), .d_i(x[3]),
                          .a_o(y1[0]), .b_o(y1[1]), .c_o(y1[2]), .d_o(y1[3]));
  t2x2h #(.R(1'b0)) back0 (.a_i(y0[0]), .b_i(y0[1]), .c_i(y0[2]), .d_i(y0[3]),
                           .a_o(z0[0]), .b_o(z0[1]), .c_o(z0[2]), .d_o(z0[3]));
  t2x2h #(.R(1'b1)) back1 (.a_i(y1[0]), .b_i(y1[1]), .c_i(y1[2]), .d_i(y1[3]),
                           .a_o(z1[0]), .b_o(z1[1]), .c_o(z1[2]), .d_o(z1[3]));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [4];
    int e0 [4], e1 [4];
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < 4; k++) begin
        v[k] = (n < 2000) ? rnd(4000) : rnd(8000);
        x[k] = sample_t'(v[k]);
      end
      #1;
      e0 = v; e1 = v;
      had(e0[0], e0[1], e0[2], e0[3], 0);
      had(e1[0], e1[1], e1[2], e1[3], 1);
      for (int k = 0; k < 4; k++) begin
        checks += 4;
        if (int'(y0[k]) != e0[k]) failures++;
        if (int'(y1[k]) != e1[k]) failures++;
        if (int'(z0[k]) != v[k])  failures++;
        if (int'(z1[k]) != v[k])  failures++;
      end
    end
    // All-equal input: a = 2v (sum / 2), the rest 0.
    for (int k = 0; k < 4; k++) x[k] = 16'sd100;
    #1;
    checks++;
    if (y0[0] != 16'sd200 || y0[1] != 0 || y0[2] != 0 || y0[3] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
