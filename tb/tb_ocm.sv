// Testbench for ocm at its full 128 x 128 size: every word is written with a
// random value, then read back in a shuffled order; each read must show the
// word one clock after its address. A write cycle must leave the read
// register unchanged.
module tb_ocm;
  import lbt_pkg::*;
  localparam int unsigned TILE  = 128;
  localparam int unsigned WORDS = TILE * TILE;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic we;
  logic [13:0] addr;
  sample_t wdata, rdata;
  sample_t model [WORDS];

  ocm dut (.clk, .we_i(we), .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t held;
    we = 1'b0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) begin
      we = 1'b1; addr = 14'(a); wdata = sample_t'($urandom);
      model[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int n = 0; n < WORDS; n++) begin
      int a;
      a = (n * 7919) % WORDS;          // 7919 is prime: visits every word once
      addr = 14'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 8) $display("addr %0d: read %h want %h", a, rdata, model[a]);
      end
    end
    // A write does not disturb the read register.
    held = rdata;
    we = 1'b1; addr = 14'd5; wdata = ~model[5];
    @(negedge clk);
    checks++;
    if (rdata !== held) failures++;
    we = 1'b0;
    @(negedge clk);
    checks++;
    if (rdata !== ~model[5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
