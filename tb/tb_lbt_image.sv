// Image workload for lbt_top at its default 128 x 128 tile size: a
// 256 x 256 test image (smooth gradients, a sharp-edged rectangle and
// noise, 8-bit samples centred on zero) is cut into four 128 x 128 tiles,
// which are transformed one after another with overlap filtering on, as an
// image larger than a tile is processed. For every tile the hardware's
// coefficients must equal the reference model's, and the reference inverse
// LBT applied to the hardware's coefficients must give back the original
// tile exactly (the transform is lossless). The testbench also reports how
// much of the tile's energy lands in the stage-2 DC and low-pass terms.
module tb_lbt_image;
  import lbt_pkg::*;
  import lbt_ref_pkg::*;
  localparam int unsigned TILE  = 128;
  localparam int unsigned WORDS = TILE * TILE;
  localparam int unsigned IMG   = 256;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  logic in_valid, in_ready, out_valid, done, busy, job_start, stage;
  sample_t tile_in, data_out;
  op_t job_op;

  lbt_top dut (
    .clk, .rst_n, .opf_en_i(1'b1), .in_valid_i(in_valid), .tile_in_i(tile_in),
    .in_ready_o(in_ready), .out_valid_o(out_valid), .data_out_o(data_out),
    .done_o(done), .busy_o(busy), .job_start_o(job_start), .job_op_o(job_op),
    .stage_o(stage));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4 * 150000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pixel(input int r, input int c);
    int v;
    v = (r + 2 * c) / 3 - 128 + ((r * c) % 17) - 8 + rnd(6);
    if (r >= 60 && r < 190 && c >= 90 && c < 150) v = v / 4 + 90;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  initial begin
    int img [];
    int hw [];
    int ref_c [];
    longint e_all, e_low;
    rst_n = 1'b0; in_valid = 1'b0; tile_in = '0;
    img = new[WORDS]; hw = new[WORDS]; ref_c = new[WORDS];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int ty = 0; ty < IMG / TILE; ty++)
      for (int tx = 0; tx < IMG / TILE; tx++) begin
        int n;
        for (int w = 0; w < WORDS; w++)
          img[w] = pixel(ty * TILE + w / TILE, tx * TILE + w % TILE);
        @(negedge clk);
        for (int w = 0; w < WORDS; w++) begin
          in_valid = 1'b1;
          tile_in = sample_t'(img[w]);
          @(negedge clk);
        end
        in_valid = 1'b0;
        n = 0;
        while (n < int'(WORDS)) begin
          @(posedge clk);
          #1;
          if (out_valid) begin
            hw[n] = int'(data_out);
            n++;
          end
        end
        ref_c = new[WORDS](img);
        lbt_tile(ref_c, TILE, 1'b1);
        for (int w = 0; w < WORDS; w++) begin
          checks++;
          if (hw[w] != ref_c[w]) begin
            failures++;
            if (failures < 8) $display("tile %0d,%0d word %0d: got %0d want %0d",
                                        ty, tx, w, hw[w], ref_c[w]);
          end
        end
        e_all = 0; e_low = 0;
        for (int w = 0; w < WORDS; w++) begin
          e_all += longint'(hw[w]) * hw[w];
          if ((w / TILE) % 4 == 0 && (w % TILE) % 4 == 0) e_low += longint'(hw[w]) * hw[w];
        end
        inv_lbt_tile(hw, TILE, 1'b1);
        for (int w = 0; w < WORDS; w++) begin
          checks++;
          if (hw[w] != img[w]) failures++;
        end
        $display("tile (%0d,%0d): %0d%% of the coefficient energy in the DC/low-pass positions",
                 ty, tx, int'(100 * e_low / (e_all == 0 ? 1 : e_all)));
        wait (!busy);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
