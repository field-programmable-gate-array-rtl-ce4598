// LBT sequencer. It drives the OCM address and every MUX, DEMUX and
// register-bank load of the datapath, one control word per clock.
//
// Operation, in this order:
//   LOAD    accept TILE*TILE tile samples in raster order (in_valid_i /
//           in_ready_o), written through MUX A.
//   stage 1 on the sample plane, then stage 2 on the plane of DC
//           coefficients (every 4th row and column), each as:
//             EDGE_H  OPF_4pt on each row of the 2x4 areas on the top and
//                     bottom tile edges (rows 0, 1, P-2, P-1; columns
//                     4i-2 .. 4i+1)
//             EDGE_V  OPF_4pt on each column of the 4x2 areas on the left
//                     and right tile edges
//             OPF44   OPF_4x4 on every 4x4 area centred on a block corner
//             FCT     FCT_4x4 on every 4x4 block
//           EDGE_H, EDGE_V and OPF44 are skipped when overlap filtering is
//           switched off (opf_en_i low when the first tile word arrives).
//   UNLOAD  stream the TILE*TILE coefficients out in raster order through
//           DEMUX A (out_valid_o, no back-pressure).
//
// Every job is four steps: RD issues the N reads (N = 4 or 16) one per
// clock and bank A captures each word a clock later through DEMUX B; RDW
// waits for the last word; CALC loads bank B (OPF_4pt) or bank C (OPF_4x4 /
// FCT through MUX C) with the unit's result; WR writes the N results back in
// place through MUX B or MUX D, MUX E and MUX A. A job therefore takes
// 2N + 2 clocks: 10 for OPF_4pt, 34 for OPF_4x4 and FCT. The job order, the
// serial gather through bank A and the in-place write-back follow the
// document; the one-word-per-clock schedule, the handshakes and the skip of
// the filter phases are this design's choices.
module lbt_ctrl
  import lbt_pkg::*;
#(
  parameter int unsigned TILE = 128
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     opf_en_i,     // overlap pre-filtering on (sampled per tile)
  input  logic     in_valid_i,   // a tile sample is offered
  output logic     in_ready_o,   // the engine accepts tile samples
  output logic     out_valid_o,  // Data out carries a coefficient
  output logic     done_o,       // one-clock pulse after the last coefficient
  output logic     busy_o,       // a tile is being transformed or read out
  output logic     job_start_o,  // one-clock pulse as a job starts
  output op_t      job_op_o,     // kind of the current job
  output logic     stage_o,      // 0: LBT stage 1, 1: stage 2
  output dp_ctrl_t ctrl_o
);
  localparam int unsigned WORDS = TILE * TILE;

  if (TILE < 32 || TILE % 16 != 0 || TILE > 256) begin : g_bad_tile
    $error("TILE must be a multiple of 16 between 32 and 256");
  end

  typedef enum logic [2:0] {
    S_LOAD, S_RD, S_RDW, S_CALC, S_WR, S_UNLOAD, S_UNLOAD_LAST
  } state_t;
  typedef enum logic [1:0] {
    PH_EDGE_H, PH_EDGE_V, PH_OPF44, PH_FCT
  } phase_t;

  state_t      state;
  phase_t      phase;
  logic        stage;
  logic        opf_en_q;
  logic [15:0] cnt;        // load / unload word counter
  logic [7:0]  ia, ib;     // job position counters
  logic [3:0]  k;          // word within the job
  logic        cap_vld;    // bank A captures the word read last clock
  logic [3:0]  cap_idx;
  logic        out_vld_q;
  logic        first_job;

  // Derived job geometry.
  int unsigned plane;      // side of the plane being processed
  int unsigned nb;         // blocks per side of that plane
  int unsigned nwords;     // words of the current job
  int unsigned ia_max, ib_max;
  int unsigned row, col;   // plane coordinates of word k
  op_t         op;
  logic        last_k, last_job_in_phase;

  always_comb begin
    plane  = stage ? TILE / 4 : TILE;
    nb     = plane / 4;
    nwords = (phase == PH_EDGE_H || phase == PH_EDGE_V) ? 4 : 16;
    case (phase)
      PH_EDGE_H, PH_EDGE_V: begin ia_max = nb - 2; ib_max = 3;      end
      PH_OPF44:             begin ia_max = nb - 2; ib_max = nb - 2; end
      default:              begin ia_max = nb - 1; ib_max = nb - 1; end
    endcase
    case (phase)
      PH_EDGE_H: op = OP_OPF4PT;
      PH_EDGE_V: op = OP_OPF4PT;
      PH_OPF44:  op = OP_OPF4X4;
      default:   op = OP_FCT;
    endcase
    case (phase)
      PH_EDGE_H: begin
        row = (ib < 2) ? 32'(ib) : plane - 4 + 32'(ib);
        col = 4 * 32'(ia) + 2 + 32'(k);
      end
      PH_EDGE_V: begin
        col = (ib < 2) ? 32'(ib) : plane - 4 + 32'(ib);
        row = 4 * 32'(ia) + 2 + 32'(k);
      end
      PH_OPF44: begin
        row = 4 * 32'(ia) + 2 + 32'(k[3:2]);
        col = 4 * 32'(ib) + 2 + 32'(k[1:0]);
      end
      default: begin
        row = 4 * 32'(ia) + 32'(k[3:2]);
        col = 4 * 32'(ib) + 32'(k[1:0]);
      end
    endcase
    last_k            = (32'(k) == nwords - 1);
    last_job_in_phase = (32'(ia) == ia_max) && (32'(ib) == ib_max);
  end

  // Control word.
  always_comb begin
    int unsigned prow, pcol;
    prow = stage ? row * 4 : row;
    pcol = stage ? col * 4 : col;
    ctrl_o             = '0;
    ctrl_o.mux_a       = MUXA_WRITEBACK;
    ctrl_o.unit        = op;
    ctrl_o.mux_e       = (op == OP_OPF4PT) ? MUXE_BANK_B : MUXE_BANK_C;
    ctrl_o.bank_a_we   = cap_vld;
    ctrl_o.bank_a_idx  = cap_idx;
    ctrl_o.mux_b_sel   = k[1:0];
    ctrl_o.mux_d_sel   = k;
    case (state)
      S_LOAD: begin
        ctrl_o.mux_a    = MUXA_TILE_IN;
        ctrl_o.mem_we   = in_valid_i;
        ctrl_o.mem_addr = cnt;
      end
      S_RD:     ctrl_o.mem_addr = 16'(prow * TILE + pcol);
      S_CALC: begin
        ctrl_o.bank_b_ld = (op == OP_OPF4PT);
        ctrl_o.bank_c_ld = (op != OP_OPF4PT);
      end
      S_WR: begin
        ctrl_o.mem_we   = 1'b1;
        ctrl_o.mem_addr = 16'(prow * TILE + pcol);
      end
      S_UNLOAD: begin
        ctrl_o.mem_addr    = cnt;
        ctrl_o.demux_a_out = 1'b1;
      end
      S_UNLOAD_LAST: ctrl_o.demux_a_out = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      phase     <= PH_EDGE_H;
      stage     <= 1'b0;
      opf_en_q  <= 1'b1;
      cnt       <= '0;
      ia        <= '0;
      ib        <= '0;
      k         <= '0;
      cap_vld   <= 1'b0;
      cap_idx   <= '0;
      out_vld_q <= 1'b0;
      done_o    <= 1'b0;
      first_job <= 1'b0;
    end else begin
      cap_vld   <= (state == S_RD);
      cap_idx   <= k;
      out_vld_q <= (state == S_UNLOAD);
      done_o    <= (state == S_UNLOAD_LAST);
      first_job <= 1'b0;
      case (state)
        S_LOAD: if (in_valid_i) begin
          if (cnt == 16'(0)) opf_en_q <= opf_en_i;
          if (32'(cnt) == WORDS - 1) begin
            cnt       <= '0;
            state     <= S_RD;
            stage     <= 1'b0;
            phase     <= opf_en_q ? PH_EDGE_H : PH_FCT;
            ia        <= '0;
            ib        <= '0;
            k         <= '0;
            first_job <= 1'b1;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
        S_RD: begin
          if (last_k) begin
            k     <= '0;
            state <= S_RDW;
          end else begin
            k <= k + 4'd1;
          end
        end
        S_RDW:  state <= S_CALC;
        S_CALC: state <= S_WR;
        S_WR: begin
          if (!last_k) begin
            k <= k + 4'd1;
          end else begin
            k         <= '0;
            state     <= S_RD;
            first_job <= 1'b1;
            if (32'(ib) != ib_max) begin
              ib <= ib + 8'd1;
            end else begin
              ib <= '0;
              if (!last_job_in_phase) begin
                ia <= ia + 8'd1;
              end else begin
                ia <= '0;
                case (phase)
                  PH_EDGE_H: phase <= PH_EDGE_V;
                  PH_EDGE_V: phase <= PH_OPF44;
                  PH_OPF44:  phase <= PH_FCT;
                  default: begin
                    if (!stage) begin
                      stage <= 1'b1;
                      phase <= opf_en_q ? PH_EDGE_H : PH_FCT;
                    end else begin
                      state     <= S_UNLOAD;
                      first_job <= 1'b0;
                      cnt       <= '0;
                    end
                  end
                endcase
              end
            end
          end
        end
        S_UNLOAD: begin
          if (32'(cnt) == WORDS - 1) begin
            cnt   <= '0;
            state <= S_UNLOAD_LAST;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
        S_UNLOAD_LAST: state <= S_LOAD;
        default: state <= S_LOAD;
      endcase
    end
  end

  assign in_ready_o  = (state == S_LOAD);
  assign out_valid_o = out_vld_q;
  assign busy_o      = (state != S_LOAD);
  assign job_start_o = first_job;
  assign job_op_o    = op;
  assign stage_o     = stage;

  // A job's words must fit the register bank that gathers them.
  always_ff @(posedge clk)
    if (rst_n && state == S_RD)
      assert (nwords == 4 || nwords == 16)
        else $error("job of %0d words", nwords);
endmodule
