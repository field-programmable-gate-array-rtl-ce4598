// LBT engine top: the forward lapped biorthogonal transform of JPEG XR on one
// TILE x TILE tile (128 x 128 by default), computed in place in on-chip
// memory.
//
// Use: offer the TILE*TILE samples of a tile in raster order on tile_in_i
// with in_valid_i (accepted while in_ready_o is high; opf_en_i is sampled
// with the first sample and selects whether the overlap pre-filter runs).
// The engine then runs LBT stage 1 (OPF_4pt on the tile edges, OPF_4x4 on
// the block corners, FCT on every 4x4 block) and stage 2 (the same on the
// plane of DC coefficients), and finally streams the TILE*TILE results in
// raster order on data_out_o with out_valid_o, one per clock, followed by a
// done_o pulse. Coefficients stay where the transform put them: the 16
// coefficients of each 4x4 block in row-major order, with the second-stage
// coefficients of a macroblock at the DC positions (every 4th row and
// column) of its 16 blocks. busy_o, job_start_o, job_op_o and stage_o report
// progress.
//
// The sequencer (lbt_ctrl) drives the datapath (lbt_datapath) through a
// control word; see those files for the schedule and the multiplexers.
module lbt_top
  import lbt_pkg::*;
#(
  parameter int unsigned TILE = 128
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    opf_en_i,
  input  logic    in_valid_i,
  input  sample_t tile_in_i,
  output logic    in_ready_o,
  output logic    out_valid_o,
  output sample_t data_out_o,
  output logic    done_o,
  output logic    busy_o,
  output logic    job_start_o,
  output op_t     job_op_o,
  output logic    stage_o
);
  dp_ctrl_t ctrl;

  lbt_ctrl #(.TILE(TILE)) u_ctrl (
    .clk, .rst_n, .opf_en_i, .in_valid_i, .in_ready_o, .out_valid_o,
    .done_o, .busy_o, .job_start_o, .job_op_o, .stage_o,
    .ctrl_o(ctrl)
  );

  lbt_datapath #(.TILE(TILE)) u_dp (
    .clk, .rst_n,
    .ctrl_i    (ctrl),
    .tile_in_i (tile_in_i),
    .data_out_o(data_out_o)
  );
endmodule
