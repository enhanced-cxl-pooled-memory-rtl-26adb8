// ctx_prefetcher: contextual prefetcher of one host.
//
// In the window between batches t-1 and t the device-side predictor sends a
// ranked list of candidate clusters, each as the tuple (g, s(g), bytes(g)),
// in decreasing score.  The prefetcher walks that list in order and asks the
// HRB group cache to stage each cluster as a unit (a prefetch request); the
// cache itself skips clusters that are resident or pinned and evicts whole
// unpinned clusters from the group-LRU tail to make room.  Staging stops
// once the next cluster would exceed the window's bandwidth budget
// (win_budget, in bytes); later candidates are then accepted and dropped so
// the list drains.  This follows the document; the stop-at-first-overflow
// rule and the counters are this design's choices.
//
// Interface: win_start (one cycle, with win_budget) opens a window; the
// candidate stream is valid/ready; cand_end (one cycle) marks that the list
// is complete, after which done rises once every staged request has been
// answered; walking is high while a window is open.  pf_* goes to the
// group cache's prefetch channel and resp_* comes back from it.
// One prefetch is in flight at a time.
module ctx_prefetcher
  import sage_pkg::*;
#(
  parameter int unsigned NUM_TABLES = 26,
  parameter int unsigned CLUSTER_W  = 3,
  localparam int unsigned TW = (NUM_TABLES > 1) ? $clog2(NUM_TABLES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 win_start,
  input  logic [BYTES_W-1:0]   win_budget,
  // ranked candidate list G_t^pred
  input  logic                 cand_valid,
  output logic                 cand_ready,
  input  logic [TW-1:0]        cand_table,
  input  logic [CLUSTER_W-1:0] cand_cluster,
  input  logic [SCORE_W-1:0]   cand_score,
  input  logic [BYTES_W-1:0]   cand_bytes,
  input  logic                 cand_end,
  // prefetch channel of the group cache
  output logic                 pf_valid,
  input  logic                 pf_ready,
  output logic [TW-1:0]        pf_table,
  output logic [CLUSTER_W-1:0] pf_cluster,
  output logic [BYTES_W-1:0]   pf_bytes,
  input  logic                 resp_valid,
  input  hrb_op_e              resp_op,
  input  hrb_res_e             resp_result,
  // status
  output logic                 done,
  output logic                 walking,
  output logic [BYTES_W-1:0]   staged_bytes,
  output logic [15:0]          n_admitted,
  output logic [15:0]          n_skipped,
  output logic [15:0]          n_dropped
);

  typedef enum logic [1:0] {S_IDLE, S_WALK, S_ISSUE, S_WAIT} state_e;
  state_e             state;
  logic [BYTES_W-1:0] budget;
  logic               budget_met, list_ended;

  assign cand_ready = (state == S_WALK);
  assign pf_valid   = (state == S_ISSUE);
  assign walking    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; budget <= '0; budget_met <= 1'b0; list_ended <= 1'b0;
      pf_table <= '0; pf_cluster <= '0; pf_bytes <= '0;
      done <= 1'b0; staged_bytes <= '0;
      n_admitted <= '0; n_skipped <= '0; n_dropped <= '0;
    end else begin
      if (cand_end) list_ended <= 1'b1;
      unique case (state)
        S_IDLE: ;
        S_WALK: begin
          if (cand_valid) begin
            if (budget_met || ({1'b0, staged_bytes} + {1'b0, cand_bytes} > {1'b0, budget})) begin
              budget_met <= 1'b1;
              n_dropped  <= n_dropped + 16'd1;
            end else begin
              pf_table   <= cand_table;
              pf_cluster <= cand_cluster;
              pf_bytes   <= cand_bytes;
              state      <= S_ISSUE;
            end
          end else if (list_ended || cand_end) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_ISSUE: if (pf_ready) state <= S_WAIT;
        S_WAIT: begin
          if (resp_valid && resp_op == OP_PREFETCH) begin
            if (resp_result == RES_ADMIT) begin
              staged_bytes <= staged_bytes + pf_bytes;
              n_admitted   <= n_admitted + 16'd1;
            end else begin
              n_skipped <= n_skipped + 16'd1;
            end
            state <= S_WALK;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (win_start) begin
        state <= S_WALK; budget <= win_budget; budget_met <= 1'b0;
        list_ended <= 1'b0; done <= 1'b0; staged_bytes <= '0;
        n_admitted <= '0; n_skipped <= '0; n_dropped <= '0;
      end
    end
  end

endmodule
