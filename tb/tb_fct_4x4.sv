// Testbench for fct_4x4: random blocks are compared with the integer
// reference model and must invert back exactly through the reference
// inverse transform. A flat block must give a DC term of 4x its value
// (sum / 4) and all 15 AC terms zero. Combinational, no clock.
module tb_fct_4x4;
  import lbt_pkg::*;
  import lbt_ref_pkg::*;
  int checks = 0, failures = 0;
  sample_t x [16];
  sample_t y [16];

  fct_4x4 dut (.x_i(x), .y_o(y));

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
        v[k] = (n < 2000) ? rnd(255) : rnd(1500);
        x[k] = sample_t'(v[k]);
      end
      #1;
      e = v;
      fct(e);
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (int'(y[k]) != e[k]) begin
          failures++;
          if (failures < 8) $display("fct word %0d: got %0d want %0d", k, y[k], e[k]);
        end
      end
      for (int k = 0; k < 16; k++) e[k] = int'(y[k]);
      inv_fct(e);
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (e[k] != v[k]) failures++;
      end
    end
    for (int k = 0; k < 16; k++) x[k] = 16'sd37;
    #1;
    checks++;
    if (y[0] != 16'sd148) begin
      failures++;
      $display("flat block DC %0d, want 148", y[0]);
    end
    for (int k = 1; k < 16; k++) begin
      checks++;
      if (y[k] != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
