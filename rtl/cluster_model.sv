// cluster_model: online clustering of one table's identifiers (the online
// model update module of the device-side predictor).
//
// Each identifier i is represented by a K_TOP-sparse vector: its K_TOP
// strongest neighbours j by affinity A(i,j) = ln(1+freq)/(ln(1+freq_max)+1),
// read from the co-occurrence window; weaker edges are dropped.  The vectors
// are clustered by mini-batch k-means with cosine distance into N_CLUST
// clusters.  On start (end of a batch) only the identifiers flagged dirty by
// the window - those whose neighbourhood changed - are revisited, one at a
// time:
//   1. SCAN   N_IDS cycles: A(i,j) for every j, kept in a sorted top-K list.
//   2. SIM    N_CLUST cycles: dot product of the vector with each centroid;
//             the closest centroid maximises dot/|c| (|v| is common), found
//             without square roots by comparing dot^2 * |c'|^2 cross-wise.
//   3. UPDATE N_IDS cycles: the identifier joins that cluster and the
//             centroid moves toward it by 1/n (n = samples it has absorbed,
//             saturating at 2^CNT_W-1), |c|^2 is recomputed on the way.
// An identifier whose vector overlaps no centroid joins the cluster of its
// strongest neighbour; one with no neighbour keeps its cluster.  Clusters
// start as contiguous blocks of identifiers with block-indicator centroids.
// The representation, the algorithm, top-K and fixed k follow the document;
// the seeding, the fallbacks, the learning-rate cap and all widths are this
// design's choices.
//
// Outputs: part[i] = cluster of i (the cluster partition M(g)), csize[g] =
// |M(g)|.  done pulses when all dirty identifiers have been revisited.
module cluster_model
  import sage_pkg::*;
#(
  parameter int unsigned N_IDS   = 64,
  parameter int unsigned K_TOP   = 4,
  parameter int unsigned N_CLUST = 8,
  parameter int unsigned FREQ_W  = 7,
  parameter int unsigned CNT_W   = 8,
  localparam int unsigned ID_W   = $clog2(N_IDS),
  localparam int unsigned CW     = (N_CLUST > 1) ? $clog2(N_CLUST) : 1,
  localparam int unsigned SZ_W   = $clog2(N_IDS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_IDS-1:0]  dirty,
  output logic              dirty_clr,
  output logic [ID_W-1:0]   rd_i, rd_j,
  input  logic [FREQ_W-1:0] rd_freq,
  input  logic [FREQ_W-1:0] freq_max,
  output logic [CW-1:0]     part  [N_IDS],
  output logic [SZ_W-1:0]   csize [N_CLUST],
  output logic              done,
  output logic              busy,
  output logic [15:0]       n_moved
);

  typedef enum logic [2:0] {S_IDLE, S_PICK, S_SCAN, S_SIM, S_UPD} state_e;
  state_e state;

  localparam int unsigned DOT_W = 2 * AFF_W + $clog2(K_TOP + 1);
  localparam int unsigned NRM_W = 2 * AFF_W + ID_W + 1;

  logic [AFF_W-1:0] cen   [N_CLUST][N_IDS];
  logic [NRM_W-1:0] norm2 [N_CLUST];
  logic [CNT_W-1:0] ccnt  [N_CLUST];
  logic [N_IDS-1:0] pend;
  logic [ID_W-1:0]  ci;                 // identifier being revisited
  logic [ID_W:0]    j;                  // scan / update index
  logic [CW:0]      c;                  // centroid index
  logic [ID_W-1:0]  nb_id  [K_TOP];     // top-K neighbours, strongest first
  logic [AFF_W-1:0] nb_a   [K_TOP];
  logic [CW-1:0]    best;
  logic [DOT_W-1:0] best_dot;
  logic [NRM_W-1:0] best_nrm;
  logic             have_best;
  logic [NRM_W-1:0] nacc;

  assign busy = (state != S_IDLE);
  assign rd_i = ci;
  assign rd_j = j[ID_W-1:0];

  // ---------------- SCAN: affinity and sorted top-K insertion ----------------
  logic [AFF_W-1:0] a_now;
  logic [ID_W-1:0]  nb_id_n [K_TOP];
  logic [AFF_W-1:0] nb_a_n  [K_TOP];
  always_comb begin
    logic placed;
    a_now = (rd_j == ci) ? '0 : affinity(16'(rd_freq), 16'(freq_max));
    placed = 1'b0;
    for (int k = 0; k < K_TOP; k++) begin nb_id_n[k] = nb_id[k]; nb_a_n[k] = nb_a[k]; end
    for (int k = 0; k < K_TOP; k++) begin
      if (!placed && a_now > nb_a[k]) begin
        placed = 1'b1;
        for (int m = K_TOP - 1; m > k; m--) begin nb_id_n[m] = nb_id[m-1]; nb_a_n[m] = nb_a[m-1]; end
        nb_id_n[k] = rd_j; nb_a_n[k] = a_now;
      end
    end
  end

  // ---------------- SIM: dot product with centroid c ----------------
  logic [DOT_W-1:0] dot;
  logic [CW-1:0]    cc;
  always_comb begin
    cc  = c[CW-1:0];
    dot = '0;
    for (int k = 0; k < K_TOP; k++) dot = dot + DOT_W'(nb_a[k] * cen[cc][nb_id[k]]);
  end
  logic better;
  always_comb begin
    logic [2*DOT_W+NRM_W-1:0] lhs, rhs;
    lhs = (2*DOT_W+NRM_W)'(dot) * (2*DOT_W+NRM_W)'(dot) * (2*DOT_W+NRM_W)'(best_nrm);
    rhs = (2*DOT_W+NRM_W)'(best_dot) * (2*DOT_W+NRM_W)'(best_dot) * (2*DOT_W+NRM_W)'(norm2[cc]);
    better = (norm2[cc] != '0) && (dot != '0) && (!have_best || lhs > rhs);
  end

  // ---------------- UPDATE: centroid moves toward the sample ----------------
  logic [AFF_W-1:0] x_d, c_new;
  logic [CNT_W-1:0] n_new;
  always_comb begin
    logic signed [AFF_W+1:0] diff, step;
    x_d = '0;
    for (int k = 0; k < K_TOP; k++) if (nb_id[k] == j[ID_W-1:0] && nb_a[k] != '0) x_d = nb_a[k];
    n_new = (ccnt[best] == '1) ? ccnt[best] : ccnt[best] + 1'b1;
    diff  = $signed({2'b00, x_d}) - $signed({2'b00, cen[best][j[ID_W-1:0]]});
    step  = diff / $signed({2'b00, n_new});
    c_new = AFF_W'($signed({2'b00, cen[best][j[ID_W-1:0]]}) + step);
  end

  // first pending identifier
  logic             pick_ok;
  logic [ID_W-1:0]  pick;
  always_comb begin
    pick_ok = 1'b0; pick = '0;
    for (int i = N_IDS - 1; i >= 0; i--) if (pend[i]) begin pick_ok = 1'b1; pick = ID_W'(i); end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pend <= '0; ci <= '0; j <= '0; c <= '0;
      dirty_clr <= 1'b0; done <= 1'b0; n_moved <= '0;
      best <= '0; best_dot <= '0; best_nrm <= '0; have_best <= 1'b0; nacc <= '0;
      for (int k = 0; k < K_TOP; k++) begin nb_id[k] <= '0; nb_a[k] <= '0; end
      for (int i = 0; i < N_IDS; i++) part[i] <= CW'(i * N_CLUST / N_IDS);
      for (int g = 0; g < N_CLUST; g++) begin
        int members;
        members = 0;
        for (int i = 0; i < N_IDS; i++) if (i * N_CLUST / N_IDS == g) members++;
        csize[g] <= SZ_W'(members);
        norm2[g] <= NRM_W'(members * (1 << (AFF_W - 1)) * (1 << (AFF_W - 1)));
        ccnt[g]  <= CNT_W'(1);
        for (int i = 0; i < N_IDS; i++)
          cen[g][i] <= (i * N_CLUST / N_IDS == g) ? AFF_W'(1 << (AFF_W - 1)) : '0;
      end
    end else begin
      dirty_clr <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pend <= dirty; dirty_clr <= 1'b1; state <= S_PICK;
        end
        S_PICK: begin
          if (!pick_ok) begin
            done <= 1'b1; state <= S_IDLE;
          end else begin
            pend[pick] <= 1'b0; ci <= pick; j <= '0;
            for (int k = 0; k < K_TOP; k++) begin nb_id[k] <= '0; nb_a[k] <= '0; end
            state <= S_SCAN;
          end
        end
        S_SCAN: begin
          for (int k = 0; k < K_TOP; k++) begin nb_id[k] <= nb_id_n[k]; nb_a[k] <= nb_a_n[k]; end
          if (int'(j) == N_IDS - 1) begin
            c <= '0; have_best <= 1'b0; best_dot <= '0; best_nrm <= '0; best <= part[ci];
            state <= S_SIM;
          end
          j <= j + 1'b1;
        end
        S_SIM: begin
          if (better) begin
            have_best <= 1'b1; best <= cc; best_dot <= dot; best_nrm <= norm2[cc];
          end
          if (int'(c) == N_CLUST - 1) begin
            j <= '0; nacc <= '0;
            if (nb_a[0] == '0) state <= S_PICK;            // no neighbour: unchanged
            else begin
              if (!(better || have_best)) best <= part[nb_id[0]];
              state <= S_UPD;
            end
          end
          c <= c + 1'b1;
        end
        S_UPD: begin
          cen[best][j[ID_W-1:0]] <= c_new;
          nacc <= nacc + NRM_W'(c_new * c_new);
          if (int'(j) == N_IDS - 1) begin
            norm2[best] <= nacc + NRM_W'(c_new * c_new);
            ccnt[best]  <= n_new;
            if (part[ci] != best) begin
              part[ci]        <= best;
              csize[part[ci]] <= csize[part[ci]] - 1'b1;
              csize[best]     <= csize[best] + 1'b1;
              n_moved         <= n_moved + 16'd1;
            end
            state <= S_PICK;
          end
          j <= j + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
