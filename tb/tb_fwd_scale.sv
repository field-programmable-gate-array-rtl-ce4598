// Testbench for fwd_scale: random and corner-case sample pairs are compared
// with the integer reference model, and the reference inverse must give the
// inputs back from the block's outputs. Combinational block, no clock.
module tb_fwd_scale;
  import lbt_pkg::*;
  import lbt_ref_pkg::*;
  int checks = 0, failures = 0;
  sample_t a_i, b_i, a_o, b_o;

  fwd_scale dut (.a_i, .b_i, .a_o, .b_o);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, ea, eb;
    for (int n = 0; n < 3000; n++) begin
      a = (n < 2000) ? rnd(4000) : rnd(32767);
      b = (n < 2000) ? rnd(4000) : rnd(32767);
      if (n == 0) begin a = 0; b = 0; end
      if (n == 1) begin a = -1; b = 1; end
      a_i = sample_t'(a); b_i = sample_t'(b);
      #1;
      ea = a; eb = b;
      scl(ea, eb);
      checks++;
      if (int'(a_o) != ea || int'(b_o) != eb) begin
        failures++;
        if (failures < 10) $display("mismatch in (%0d,%0d): got (%0d,%0d) want (%0d,%0d)",
                                    a, b, a_o, b_o, ea, eb);
      end
      ea = int'(a_o); eb = int'(b_o);
      inv_scl(ea, eb);
      checks++;
      if (ea != a || eb != b) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
