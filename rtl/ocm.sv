// OCM: single-port on-chip tile memory (block RAM on an FPGA). It holds one
// TILE x TILE tile of 16-bit samples, 128 x 128 x 16 = 262,144 bits by
// default, and also every intermediate result, since all LBT steps work in
// place.
//
// One access per clock: with we_i high, wdata_i is written at addr_i;
// otherwise the word at addr_i appears on rdata_o after the next rising edge
// (one-cycle read latency, registered output). The contents are not reset.
module ocm
  import lbt_pkg::*;
#(
  parameter int unsigned TILE   = 128,
  parameter int unsigned ADDR_W = $clog2(TILE * TILE)
) (
  input  logic              clk,
  input  logic              we_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  sample_t           wdata_i,
  output sample_t           rdata_o
);
  sample_t mem [TILE * TILE];

  always_ff @(posedge clk) begin
    if (we_i) mem[addr_i] <= wdata_i;
    else      rdata_o     <= mem[addr_i];
  end
endmodule
