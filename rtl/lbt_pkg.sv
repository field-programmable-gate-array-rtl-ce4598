// Shared types, sizes and arithmetic helpers of the lapped biorthogonal
// transform (LBT) engine.
//
// All samples are 16-bit two's complement. Every lifting step of the filters
// and of the core transform is written as "x +/-= (k*y + r) >>> s"; the
// helpers below evaluate the term (k*y + r) >>> s at 19 bits so that the
// rounding constant and the multiply by 3 can never wrap, and the result is
// brought back to 16 bits. Sums and differences of samples themselves wrap at
// 16 bits, as 16-bit adders do (the document states 16-bit adders and
// subtractors). Shifts are arithmetic (sign preserving).
package lbt_pkg;

  localparam int unsigned DATA_W = 16;
  typedef logic signed [DATA_W-1:0] sample_t;

  // Kind of job the sequencer runs on the OCM contents.
  typedef enum logic [1:0] {
    OP_OPF4PT = 2'd0,   // 4-point pre-filter on a 2x4 / 4x2 tile-edge area
    OP_OPF4X4 = 2'd1,   // 4x4 pre-filter on an area across a block corner
    OP_FCT    = 2'd2    // forward core transform on a 4x4 block
  } op_t;

  // MUX A: what is written into the OCM.
  typedef enum logic {
    MUXA_TILE_IN  = 1'b0,  // tile data from outside
    MUXA_WRITEBACK = 1'b1  // processed data from MUX E
  } mux_a_t;

  // MUX E: which register bank feeds the write-back path.
  typedef enum logic {
    MUXE_BANK_B = 1'b0,    // OPF_4pt results through MUX B
    MUXE_BANK_C = 1'b1     // OPF_4x4 / FCT results through MUX D
  } mux_e_t;

  // Control word from the sequencer to the datapath of Figure 3.
  typedef struct packed {
    logic         mem_we;     // OCM write strobe
    logic [15:0]  mem_addr;   // OCM word address (row * TILE + column)
    mux_a_t       mux_a;      // OCM write-data source
    logic         demux_a_out;// DEMUX A: 1 = read data to Data out, 0 = to DEMUX B
    logic         bank_a_we;  // DEMUX B: load one word of bank A
    logic [3:0]   bank_a_idx; //   ... at this index
    op_t          unit;       // DEMUX C/D and MUX C: which unit is fed / used
    logic         bank_b_ld;  // load bank B from OPF_4pt
    logic         bank_c_ld;  // load bank C from MUX C
    logic [1:0]   mux_b_sel;  // MUX B: word of bank B to write back
    logic [3:0]   mux_d_sel;  // MUX D: word of bank C to write back
    mux_e_t       mux_e;      // MUX E
  } dp_ctrl_t;

  // (k*y + r) >>> s, evaluated without overflow, truncated to a sample.
  // k and r are small constants (at most 3 and 4).
  function automatic sample_t lift(input sample_t y, input logic [2:0] k,
                                   input logic [2:0] r, input logic [3:0] s);
    logic signed [DATA_W+2:0] w;
    w = signed'({16'd0, k}) * (DATA_W+3)'(y) + signed'({16'd0, r});
    w = w >>> s;
    return w[DATA_W-1:0];
  endfunction

endpackage
