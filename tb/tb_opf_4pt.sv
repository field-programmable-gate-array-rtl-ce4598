// Testbench for opf_4pt: random sample quadruples (small image-like values
// and full-range values) are compared with the integer reference model, and
// the reference inverse filter must return the inputs from the block's
// outputs. A flat input (no edge) is also checked against the reference.
// Combinational, no clock.
module tb_opf_4pt;
  import lbt_pkg::*;
  import lbt_ref_pkg::*;
  int checks = 0, failures = 0;
  sample_t x [4];
  sample_t y [4];

  opf_4pt dut (.x_i(x), .y_o(y));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [4];
    int e [4];
    for (int n = 0; n < 4000; n++) begin
      for (int k = 0; k < 4; k++) begin
        v[k] = (n < 3000) ? rnd(255) : rnd(4000);
        if (n == 0) v[k] = 50;
        x[k] = sample_t'(v[k]);
      end
      #1;
      e = v;
      opf4(e[0], e[1], e[2], e[3]);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(y[k]) != e[k]) begin
          failures++;
          if (failures < 8) $display("opf4 word %0d: got %0d want %0d", k, y[k], e[k]);
        end
      end
      for (int k = 0; k < 4; k++) e[k] = int'(y[k]);
      inv_opf4(e[0], e[1], e[2], e[3]);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (e[k] != v[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
