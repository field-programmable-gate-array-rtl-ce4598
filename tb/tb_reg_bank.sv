// Testbench for reg_bank: a 16-word bank (as bank A and C) and a 4-word bank
// (as bank B) are reset, filled one word at a time, loaded in parallel, and
// checked against a model after every clock.
module tb_reg_bank;
  import lbt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  logic we16, ld16, we4, ld4;
  logic [3:0] idx16;
  logic [1:0] idx4;
  sample_t d16, d4;
  sample_t all16 [16], q16 [16], m16 [16];
  sample_t all4 [4], q4 [4], m4 [4];

  reg_bank #(.N(16)) dut16 (.clk, .rst_n, .we_i(we16), .idx_i(idx16), .d_i(d16),
                            .ld_all_i(ld16), .d_all_i(all16), .q_o(q16));
  reg_bank #(.N(4))  dut4  (.clk, .rst_n, .we_i(we4), .idx_i(idx4), .d_i(d4),
                            .ld_all_i(ld4), .d_all_i(all4), .q_o(q4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (q16[k] !== m16[k]) failures++;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (q4[k] !== m4[k]) failures++;
    end
  endtask

  initial begin
    rst_n = 1'b0; we16 = 0; ld16 = 0; we4 = 0; ld4 = 0; idx16 = 0; idx4 = 0;
    d16 = '0; d4 = '0;
    for (int k = 0; k < 16; k++) all16[k] = '0;
    for (int k = 0; k < 4; k++)  all4[k]  = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 16; k++) m16[k] = '0;
    for (int k = 0; k < 4; k++)  m4[k]  = '0;
    compare();
    for (int n = 0; n < 2000; n++) begin
      we16 = ($urandom_range(3) != 0); ld16 = ($urandom_range(7) == 0);
      we4  = ($urandom_range(3) != 0); ld4  = ($urandom_range(7) == 0);
      idx16 = 4'($urandom); idx4 = 2'($urandom);
      d16 = sample_t'($urandom); d4 = sample_t'($urandom);
      for (int k = 0; k < 16; k++) all16[k] = sample_t'($urandom);
      for (int k = 0; k < 4; k++)  all4[k]  = sample_t'($urandom);
      if (ld16) m16 = all16; else if (we16) m16[idx16] = d16;
      if (ld4)  m4  = all4;  else if (we4)  m4[idx4]   = d4;
      @(negedge clk);
      compare();
    end
    rst_n = 1'b0;
    @(negedge clk);
    for (int k = 0; k < 16; k++) m16[k] = '0;
    for (int k = 0; k < 4; k++)  m4[k]  = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
