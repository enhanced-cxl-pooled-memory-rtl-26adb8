// cluster_ranker: next-batch candidate set of one table (the locality
// prediction model's output stage).
//
// At the end of a batch it scores every cluster g against the multiset U_t
// of identifiers in the recent window:
//     s(g) = sum_{i in U_t} max_{j in M(g)} A(i,j) / |M(g)|^alpha
// and then emits the clusters in decreasing s(g), each with its size in
// bytes (|M(g)| x ENTRY_BYTES), until the next one would exceed the staging
// byte budget.  The formula, the ordering and the budget stop follow the
// document.  This design's choices: A(i,i) counts as the largest affinity
// (an identifier is closest to itself), clusters scoring 0 are not emitted,
// |M|^alpha uses the linear log2/exp2 approximations of sage_pkg, and ties
// go to the lower cluster number.
//
// Timing: the scoring pass reads one pair per cycle, |U_t| x N_IDS cycles,
// then N_CLUST cycles divide, then one candidate per accepted handshake.
// The pair counts come through a combinational read port of the window.
module cluster_ranker
  import sage_pkg::*;
#(
  parameter int unsigned     N_IDS       = 64,
  parameter int unsigned     W           = 16,
  parameter int unsigned     N_CLUST     = 8,
  parameter int unsigned     FREQ_W      = 7,
  parameter logic [ALPHA_F:0] ALPHA      = 5'd8,     // alpha = ALPHA / 16
  parameter int unsigned     ENTRY_BYTES = 128,
  localparam int unsigned    ID_W = $clog2(N_IDS),
  localparam int unsigned    WP_W = $clog2(W),
  localparam int unsigned    CW   = (N_CLUST > 1) ? $clog2(N_CLUST) : 1,
  localparam int unsigned    SZ_W = $clog2(N_IDS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [BYTES_W-1:0] budget,
  input  logic [ID_W-1:0]    win_id [W],
  input  logic [WP_W:0]      win_cnt,
  input  logic [WP_W-1:0]    win_head,
  input  logic [CW-1:0]      part  [N_IDS],
  input  logic [SZ_W-1:0]    csize [N_CLUST],
  output logic [ID_W-1:0]    rd_i, rd_j,
  input  logic [FREQ_W-1:0]  rd_freq,
  input  logic [FREQ_W-1:0]  freq_max,
  output logic               cand_valid,
  input  logic               cand_ready,
  output logic [CW-1:0]      cand_cluster,
  output logic [SCORE_W-1:0] cand_score,
  output logic [BYTES_W-1:0] cand_bytes,
  output logic               done,
  output logic               busy
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DIV, S_EMIT} state_e;
  state_e state;

  localparam int unsigned SUM_W = AFF_W + WP_W + 1;

  logic [AFF_W-1:0]   mx    [N_CLUST];
  logic [SUM_W-1:0]   sum   [N_CLUST];
  logic [SCORE_W-1:0] score [N_CLUST];
  logic [N_CLUST-1:0] sent;
  logic [WP_W:0]      p;
  logic [ID_W:0]      j;
  logic [CW:0]        c;
  logic [BYTES_W-1:0] emitted;

  logic [ID_W-1:0] i_cur;
  always_comb begin
    int idx;
    idx   = int'(win_head) + int'(p);
    if (idx >= W) idx = idx - W;
    i_cur = win_id[idx];
  end
  assign rd_i = i_cur;
  assign rd_j = j[ID_W-1:0];
  assign busy = (state != S_IDLE);

  logic [AFF_W-1:0] a_now;
  logic [CW-1:0]    g_now;
  assign a_now = (rd_j == i_cur) ? '1 : affinity(16'(rd_freq), 16'(freq_max));
  assign g_now = part[rd_j];

  // s(g) of cluster c
  logic [SCORE_W-1:0] s_div;
  always_comb begin
    logic [15+LOG_F:0] pw;
    logic [63:0] q;
    pw    = pow_alpha(16'(csize[c[CW-1:0]]), ALPHA);
    q     = (64'(sum[c[CW-1:0]]) << (SCORE_F + LOG_F - AFF_W)) / 64'(pw);
    s_div = (csize[c[CW-1:0]] == '0) ? '0 : SCORE_W'(q);
  end

  // best cluster not yet emitted
  logic          pick_ok;
  logic [CW-1:0] pick;
  always_comb begin
    pick_ok = 1'b0; pick = '0;
    for (int g = 0; g < N_CLUST; g++)
      if (!sent[g] && score[g] != '0 && (!pick_ok || score[g] > score[pick])) begin
        pick_ok = 1'b1; pick = CW'(g);
      end
  end

  logic [BYTES_W-1:0] pick_bytes;
  assign pick_bytes = BYTES_W'(csize[pick]) * BYTES_W'(ENTRY_BYTES);

  assign cand_valid   = (state == S_EMIT) && pick_ok &&
                        ({1'b0, emitted} + {1'b0, pick_bytes} <= {1'b0, budget});
  assign cand_cluster = pick;
  assign cand_score   = score[pick];
  assign cand_bytes   = pick_bytes;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; p <= '0; j <= '0; c <= '0; sent <= '0; emitted <= '0; done <= 1'b0;
      for (int g = 0; g < N_CLUST; g++) begin mx[g] <= '0; sum[g] <= '0; score[g] <= '0; end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          p <= '0; j <= '0; sent <= '0; emitted <= '0;
          for (int g = 0; g < N_CLUST; g++) begin mx[g] <= '0; sum[g] <= '0; end
          state <= (win_cnt == '0) ? S_DIV : S_SCAN;
          c <= '0;
        end
        S_SCAN: begin
          if (int'(j) == N_IDS - 1) begin
            // close identifier i: add max_j A(i,j) of every cluster
            for (int g = 0; g < N_CLUST; g++) begin
              logic [AFF_W-1:0] m;
              m = mx[g];
              if (g_now == CW'(g) && a_now > m) m = a_now;
              sum[g] <= sum[g] + SUM_W'(m);
              mx[g]  <= '0;
            end
            j <= '0;
            if (p + 1'b1 == win_cnt) begin c <= '0; state <= S_DIV; end
            p <= p + 1'b1;
          end else begin
            if (a_now > mx[g_now]) mx[g_now] <= a_now;
            j <= j + 1'b1;
          end
        end
        S_DIV: begin
          score[c[CW-1:0]] <= s_div;
          if (int'(c) == N_CLUST - 1) state <= S_EMIT;
          c <= c + 1'b1;
        end
        S_EMIT: begin
          if (cand_valid) begin
            if (cand_ready) begin
              sent[pick] <= 1'b1;
              emitted    <= emitted + pick_bytes;
            end
          end else begin
            done  <= 1'b1;       // list exhausted or budget met
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
