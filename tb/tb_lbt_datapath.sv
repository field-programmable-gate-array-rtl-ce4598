// Testbench for lbt_datapath (TILE = 32): the control word is driven
// directly, without the sequencer. A random tile is written through MUX A;
// then one FCT job (bank A -> FCT -> MUX C -> bank C -> MUX D -> MUX E), one
// OPF_4x4 job and one OPF_4pt job (bank A -> DEMUX C -> OPF_4pt -> bank B ->
// MUX B -> MUX E) are run in place; finally the whole memory is read
// through DEMUX A and compared with the reference model. DEMUX A must give
// zero on Data out while it routes to bank A.
module tb_lbt_datapath;
  import lbt_pkg::*;
  import lbt_ref_pkg::*;
  localparam int unsigned TILE  = 32;
  localparam int unsigned WORDS = TILE * TILE;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  dp_ctrl_t ctrl;
  sample_t tile_in, data_out;
  int model [];

  lbt_datapath #(.TILE(TILE)) dut (.clk, .rst_n, .ctrl_i(ctrl), .tile_in_i(tile_in),
                                   .data_out_o(data_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one job on the words at addresses addr[0..n-1] with the given unit.
  task automatic run_job(input op_t unit, input int addr [16], input int n);
    ctrl = '0;
    ctrl.unit = unit;
    for (int k = 0; k <= n; k++) begin
      ctrl.mem_we     = 1'b0;
      ctrl.mem_addr   = (k < n) ? 16'(addr[k]) : 16'd0;
      ctrl.bank_a_we  = (k > 0);
      ctrl.bank_a_idx = 4'(k - 1);
      @(negedge clk);
      checks++;
      if (data_out !== '0) failures++;     // DEMUX A routes to bank A
    end
    ctrl.bank_a_we = 1'b0;
    ctrl.bank_b_ld = (unit == OP_OPF4PT);
    ctrl.bank_c_ld = (unit != OP_OPF4PT);
    @(negedge clk);
    ctrl.bank_b_ld = 1'b0;
    ctrl.bank_c_ld = 1'b0;
    ctrl.mux_a = MUXA_WRITEBACK;
    ctrl.mux_e = (unit == OP_OPF4PT) ? MUXE_BANK_B : MUXE_BANK_C;
    for (int k = 0; k < n; k++) begin
      ctrl.mem_we    = 1'b1;
      ctrl.mem_addr  = 16'(addr[k]);
      ctrl.mux_b_sel = 2'(k);
      ctrl.mux_d_sel = 4'(k);
      @(negedge clk);
    end
    ctrl = '0;
  endtask

  initial begin
    int addr [16];
    blk_t x;
    int a, b, c, d;
    model = new[WORDS];
    rst_n = 1'b0; ctrl = '0; tile_in = '0;
    @(negedge clk);
    rst_n = 1'b1;
    // tile load through MUX A
    for (int w = 0; w < WORDS; w++) begin
      model[w] = rnd(255);
      ctrl.mem_we = 1'b1; ctrl.mux_a = MUXA_TILE_IN; ctrl.mem_addr = 16'(w);
      tile_in = sample_t'(model[w]);
      @(negedge clk);
    end
    ctrl = '0; tile_in = '0;
    // FCT on the block at rows 4..7, columns 8..11
    for (int k = 0; k < 16; k++) addr[k] = (4 + k/4) * TILE + 8 + k%4;
    run_job(OP_FCT, addr, 16);
    for (int k = 0; k < 16; k++) x[k] = model[addr[k]];
    fct(x);
    for (int k = 0; k < 16; k++) model[addr[k]] = x[k];
    // OPF_4x4 on the area at rows 2..5, columns 2..5
    for (int k = 0; k < 16; k++) addr[k] = (2 + k/4) * TILE + 2 + k%4;
    run_job(OP_OPF4X4, addr, 16);
    for (int k = 0; k < 16; k++) x[k] = model[addr[k]];
    opf44(x);
    for (int k = 0; k < 16; k++) model[addr[k]] = x[k];
    // OPF_4pt on row 0, columns 14..17
    for (int k = 0; k < 16; k++) addr[k] = 14 + (k % 4);
    run_job(OP_OPF4PT, addr, 4);
    a = model[14]; b = model[15]; c = model[16]; d = model[17];
    opf4(a, b, c, d);
    model[14] = a; model[15] = b; model[16] = c; model[17] = d;
    // read everything back through DEMUX A
    ctrl.demux_a_out = 1'b1;
    // (the address is set after a falling edge; the word is on Data out
    // after the next rising edge)
    for (int w = 0; w < WORDS; w++) begin
      ctrl.mem_addr = 16'(w);
      @(negedge clk);
      checks++;
      if (int'(data_out) != model[w]) begin
        failures++;
        if (failures < 8) $display("word %0d: got %0d want %0d", w, data_out, model[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
