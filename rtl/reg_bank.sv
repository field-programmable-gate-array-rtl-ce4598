// Register bank of N 16-bit registers (bank A: N = 16, bank B: N = 4,
// bank C: N = 16).
//
// Two ways to load: one word at a time (we_i, idx_i, d_i), as bank A is
// filled from the single-port OCM through DEMUX B, or all N words at once
// (ld_all_i, d_all_i), as banks B and C capture a processing unit's result.
// All N registers are visible in parallel on q_o. Synchronous active-low
// reset clears the bank; loads take effect at the next rising clock edge.
module reg_bank
  import lbt_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we_i,
  input  logic [$clog2(N)-1:0] idx_i,
  input  sample_t              d_i,
  input  logic                 ld_all_i,
  input  sample_t              d_all_i [N],
  output sample_t              q_o [N]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) q_o[k] <= '0;
    end else if (ld_all_i) begin
      q_o <= d_all_i;
    end else if (we_i) begin
      q_o[idx_i] <= d_i;
    end
  end
endmodule
