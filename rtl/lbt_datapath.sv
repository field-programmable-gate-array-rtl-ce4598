// LBT datapath: the on-chip tile memory, the three register banks, the three
// processing units and the multiplexers that join them, as in the
// architecture diagram. Every select comes from the sequencer's control word.
//
//   MUX A     OCM write data: tile input or write-back from MUX E
//   DEMUX A   OCM read data: to Data out, or to DEMUX B (the other output
//             reads as zero)
//   DEMUX B   writes the read word into bank A at ctrl.bank_a_idx
//   DEMUX C   bank A words 0..3 to OPF_4pt (zero while another unit is used)
//   DEMUX D   bank A words 0..15 to OPF_4x4 or to FCT (zero to the other)
//   bank B    4 words, captures OPF_4pt's result
//   MUX C     OPF_4x4 or FCT result into bank C (16 words)
//   MUX B/D   pick one word of bank B / bank C for write-back
//   MUX E     bank B path or bank C path to MUX A
// The units are combinational; banks and OCM are the only state. OCM read
// data is valid one clock after its address. The zeroing on the unused
// DEMUX outputs is this design's way of giving the demultiplexers a meaning
// in a single-clock design.
module lbt_datapath
  import lbt_pkg::*;
#(
  parameter int unsigned TILE = 128
) (
  input  logic     clk,
  input  logic     rst_n,
  input  dp_ctrl_t ctrl_i,
  input  sample_t  tile_in_i,   // Tile data In
  output sample_t  data_out_o   // Data out
);
  localparam int unsigned ADDR_W = $clog2(TILE * TILE);

  sample_t mem_wdata, mem_rdata, to_bank_a, mux_e_out;
  sample_t bank_a [16];
  sample_t bank_b [4];
  sample_t bank_c [16];
  sample_t opf4_in [4];
  sample_t opf4_out [4];
  sample_t opf44_in [16];
  sample_t opf44_out [16];
  sample_t fct_in [16];
  sample_t fct_out [16];
  sample_t mux_c_out [16];
  sample_t unused_a [16];
  sample_t unused_b [4];

  // MUX A
  assign mem_wdata = (ctrl_i.mux_a == MUXA_TILE_IN) ? tile_in_i : mux_e_out;

  ocm #(.TILE(TILE)) u_ocm (
    .clk    (clk),
    .we_i   (ctrl_i.mem_we),
    .addr_i (ctrl_i.mem_addr[ADDR_W-1:0]),
    .wdata_i(mem_wdata),
    .rdata_o(mem_rdata)
  );

  // DEMUX A
  assign data_out_o = ctrl_i.demux_a_out ? mem_rdata : '0;
  assign to_bank_a  = ctrl_i.demux_a_out ? '0 : mem_rdata;

  always_comb for (int k = 0; k < 16; k++) unused_a[k] = '0;
  always_comb for (int k = 0; k < 4; k++)  unused_b[k] = '0;

  // DEMUX B + bank A
  reg_bank #(.N(16)) u_bank_a (
    .clk(clk), .rst_n(rst_n),
    .we_i(ctrl_i.bank_a_we), .idx_i(ctrl_i.bank_a_idx), .d_i(to_bank_a),
    .ld_all_i(1'b0), .d_all_i(unused_a),
    .q_o(bank_a)
  );

  // DEMUX C and DEMUX D
  always_comb begin
    for (int k = 0; k < 4; k++)
      opf4_in[k] = (ctrl_i.unit == OP_OPF4PT) ? bank_a[k] : '0;
    for (int k = 0; k < 16; k++) begin
      opf44_in[k] = (ctrl_i.unit == OP_OPF4X4) ? bank_a[k] : '0;
      fct_in[k]   = (ctrl_i.unit == OP_FCT)    ? bank_a[k] : '0;
    end
  end

  opf_4pt u_opf4   (.x_i(opf4_in),  .y_o(opf4_out));
  opf_4x4 u_opf44  (.x_i(opf44_in), .y_o(opf44_out));
  fct_4x4 u_fct    (.x_i(fct_in),   .y_o(fct_out));

  // Bank B
  reg_bank #(.N(4)) u_bank_b (
    .clk(clk), .rst_n(rst_n),
    .we_i(1'b0), .idx_i(2'd0), .d_i('0),
    .ld_all_i(ctrl_i.bank_b_ld), .d_all_i(opf4_out),
    .q_o(bank_b)
  );

  // MUX C + bank C
  always_comb
    for (int k = 0; k < 16; k++)
      mux_c_out[k] = (ctrl_i.unit == OP_OPF4X4) ? opf44_out[k] : fct_out[k];

  reg_bank #(.N(16)) u_bank_c (
    .clk(clk), .rst_n(rst_n),
    .we_i(1'b0), .idx_i(4'd0), .d_i('0),
    .ld_all_i(ctrl_i.bank_c_ld), .d_all_i(mux_c_out),
    .q_o(bank_c)
  );

  // MUX B, MUX D, MUX E
  assign mux_e_out = (ctrl_i.mux_e == MUXE_BANK_B) ? bank_b[ctrl_i.mux_b_sel]
                                                   : bank_c[ctrl_i.mux_d_sel];
endmodule
