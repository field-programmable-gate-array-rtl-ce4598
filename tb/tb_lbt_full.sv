// Full-size testbench for lbt_top with its default parameters (one 128 x 128
// tile: stage 1 on the 128 x 128 plane, stage 2 on the 32 x 32 plane of DC
// coefficients). The same checks as the reduced end-to-end testbench
// tb_lbt_top. Three tiles are transformed: overlap filtering on, off,
// and on again, with random gaps in the input stream. For each tile all
// TILE*TILE outputs are compared with the reference model, the jobs of each
// kind and stage are counted against the number the tile geometry implies,
// and the clocks from the last input word to the first output word must be
// the job schedule's total (2N + 2 per job of N words) plus one.
module tb_lbt_full;
  import lbt_pkg::*;
  import lbt_ref_pkg::*;
  localparam int unsigned TILE  = 128;
  localparam int unsigned WORDS = TILE * TILE;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  logic opf_en, in_valid, in_ready, out_valid, done, busy, job_start, stage;
  sample_t tile_in, data_out;
  op_t job_op;

  lbt_top dut (
    .clk, .rst_n, .opf_en_i(opf_en), .in_valid_i(in_valid), .tile_in_i(tile_in),
    .in_ready_o(in_ready), .out_valid_o(out_valid), .data_out_o(data_out),
    .done_o(done), .busy_o(busy), .job_start_o(job_start), .job_op_o(job_op),
    .stage_o(stage));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100 * WORDS + 200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // job counters per [stage][op]; mechanism counters over the whole run
  int jobs [2][3];
  int n_stall = 0, n_opf_off = 0, n_opf_on = 0;

  always @(posedge clk) begin
    if (rst_n && job_start) jobs[stage][int'(job_op)]++;
  end

  task automatic run_tile(input bit en, input bit gaps);
    int img [];
    int exp_jobs [2][3];
    int t_last_in, t_first_out, sched, nout, cyc;
    img = new[WORDS];
    for (int s = 0; s < 2; s++) for (int o = 0; o < 3; o++) jobs[s][o] = 0;
    if (en) n_opf_on++; else n_opf_off++;
    // stream the tile in
    cyc = 0;
    opf_en = en;
    for (int w = 0; w < WORDS; w++) begin
      img[w] = rnd(255);
      if (gaps && $urandom_range(7) == 0) begin
        in_valid = 1'b0;
        n_stall++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      tile_in = sample_t'(img[w]);
      @(posedge clk);
      checks++;
      if (!in_ready) failures++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    opf_en = ~en;                        // must not matter after the first word
    t_last_in = 0;
    // reference result and schedule
    lbt_tile(img, TILE, en);
    for (int s = 0; s < 2; s++) begin
      int p;
      p = (s == 0) ? TILE : TILE / 4;
      exp_jobs[s][0] = en ? n_opf4(p) : 0;
      exp_jobs[s][1] = en ? n_opf44(p) : 0;
      exp_jobs[s][2] = n_fct(p);
    end
    sched = 0;
    for (int s = 0; s < 2; s++)
      sched += 10 * exp_jobs[s][0] + 34 * exp_jobs[s][1] + 34 * exp_jobs[s][2];
    // wait for the coefficients
    t_first_out = 0;
    while (!out_valid) begin
      @(posedge clk);
      t_first_out++;
      #1;
    end
    checks++;
    if (t_first_out != sched + 1) begin
      failures++;
      $display("latency %0d clocks, schedule says %0d", t_first_out, sched + 1);
    end
    nout = 0;
    while (out_valid) begin
      checks++;
      if (int'(data_out) != img[nout]) begin
        failures++;
        if (failures < 10) $display("coef %0d (row %0d col %0d): got %0d want %0d",
                                    nout, nout / TILE, nout % TILE, data_out, img[nout]);
      end
      nout++;
      @(posedge clk);
      #1;
    end
    checks++;
    if (nout != WORDS) begin
      failures++;
      $display("%0d coefficients out, want %0d", nout, WORDS);
    end
    checks++;
    if (!done) failures++;               // done follows the last coefficient
    for (int s = 0; s < 2; s++)
      for (int o = 0; o < 3; o++) begin
        checks++;
        if (jobs[s][o] != exp_jobs[s][o]) begin
          failures++;
          $display("stage %0d op %0d: %0d jobs, want %0d", s + 1, o, jobs[s][o], exp_jobs[s][o]);
        end
      end
    $display("tile opf_en=%0d: %0d clocks of processing, jobs s1 %0d/%0d/%0d s2 %0d/%0d/%0d",
             en, t_first_out, jobs[0][0], jobs[0][1], jobs[0][2],
             jobs[1][0], jobs[1][1], jobs[1][2]);
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; opf_en = 1'b1; in_valid = 1'b0; tile_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_tile(1'b1, 1'b1);
    run_tile(1'b0, 1'b0);
    run_tile(1'b1, 1'b0);
    // every mechanism must have happened
    checks++; if (n_stall == 0)   begin failures++; $display("no input gap"); end
    checks++; if (n_opf_off == 0) begin failures++; $display("no filter-off tile"); end
    checks++; if (n_opf_on == 0)  begin failures++; $display("no filter-on tile"); end
    $display("mechanisms: input gaps %0d, tiles with filter on %0d, off %0d",
             n_stall, n_opf_on, n_opf_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
