// Testbench for opf_4x4: random 4x4 areas are compared with the integer
// reference model and must invert back exactly through the reference
// inverse filter. Combinational, no clock.
module tb_opf_4x4;
  import lbt_pkg::*;
  import lbt_ref_pkg::*;
  int checks = 0, failures = 0;
  sample_t x [16];
  sample_t y [16];

  opf_4x4 dut (.x_i(x), .y_o(y));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t v, e;
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < 16; k++) begin
        v[k] = (n < 2000) ? rnd(255) : rnd(3000);
        x[k] = sample_t'(v[k]);
      end
      #1;
      e = v;
      opf44(e);
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (int'(y[k]) != e[k]) begin
          failures++;
          if (failures < 8) $display("opf44 word %0d: got %0d want %0d", k, y[k], e[k]);
        end
      end
      for (int k = 0; k < 16; k++) e[k] = int'(y[k]);
      inv_opf44(e);
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (e[k] != v[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
