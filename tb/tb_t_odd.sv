// Testbench for t_odd (and the t_oddodd unit that sits beside it in the core
// transform): random quadruples are compared with the integer reference
// model, and the reference inverse must give the inputs back from each
// block's outputs. Combinational.
module tb_t_odd;
  import lbt_pkg::*;
  import lbt_ref_pkg::*;
  int checks = 0, failures = 0;
  sample_t x [4];
  sample_t y [4], w [4];

  t_odd    dut  (.a_i(x[0]), .b_i(x[1]), .c_i(x[2]), .d_i(x[3]),
                 .a_o(y[0]), .b_o(y[1]), .c_o(y[2]), .d_o(y[3]));
  t_oddodd dut2 (.a_i(x[0]), .b_i(x[1]), .c_i(x[2]), .d_i(x[3]),
                 .a_o(w[0]), .b_o(w[1]), .c_o(w[2]), .d_o(w[3]));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [4];
    int e [4], f [4];
    for (int n = 0; n < 4000; n++) begin
      for (int k = 0; k < 4; k++) begin
        v[k] = rnd(4000);
        x[k] = sample_t'(v[k]);
      end
      #1;
      e = v; f = v;
      odd(e[0], e[1], e[2], e[3]);
      oddodd(f[0], f[1], f[2], f[3]);
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (int'(y[k]) != e[k]) failures++;
        if (int'(w[k]) != f[k]) failures++;
      end
      for (int k = 0; k < 4; k++) begin e[k] = int'(y[k]); f[k] = int'(w[k]); end
      inv_odd(e[0], e[1], e[2], e[3]);
      inv_oddodd(f[0], f[1], f[2], f[3]);
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (e[k] != v[k]) failures++;
        if (f[k] != v[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
