// sage_top: the Sage CXL pooled-memory system for embedding inference.
//
// Several hosts share embedding tables that live in a CXL pooled-memory
// device.  Sage hides the CXL latency in three ways, all wired together
// here:
//   Host side, one set per host:
//     hrb_group_cache - directory of the host-reserved buffer (HRB) in host
//                       DRAM, managed at cluster granularity: group LRU,
//                       pinning for the current batch, bypass when a cluster
//                       cannot fit, one byte region per table.
//     ctx_prefetcher  - stages the clusters the device predicts for the next
//                       batch into the HRB under a byte budget.
//   Device side, shared by all hosts:
//     locality_monitor - merges the hosts' lookup streams.
//     per table: cooc_window (sliding-window pair counts), cluster_model
//                (top-K affinity vectors, mini-batch k-means) and
//                cluster_ranker (s(g) and the ranked candidate list).
//     ndp_token_scheduler, NDP_UNITS x lookahead_ndp, ndp_result_buffer -
//                best-effort near-memory computation of the sparse-only
//                feature interaction, results read back by the hosts.
//
// Flow.  A host lookup (table, id) is mapped to its cluster through the
// model's current partition and goes to the host's group cache (hit /
// admit / bypass answer on h_lk_resp_*); it is also reported to the device
// monitor, which samples the reports without ever holding a host back
// (mon_dropped counts the reports it had no room for).  On
// epoch_end the device re-clusters the identifiers whose co-occurrence
// changed, then scores the clusters and broadcasts each table's ranked list
// to every host whose prefetch window is open (h_pf_start); pred_done marks
// the end of the lists.  Cold-feature interaction tasks (h_task_*) are
// admitted or refused at once by the token scheduler, computed by a free
// NDP unit from rows in pooled memory, and read back through res_rd_*.
//
// Not inside: the hosts' CPUs and DRAM, the CXL link and the pooled DRAM
// itself.  The pooled memory is reached through mem_req_*/mem_rsp_*
// (responses tagged with the requesting unit, in order per unit); the host
// data copies that follow admissions and evictions are the host's job.
// Parameter defaults follow the document where it gives a number (8 hosts,
// 26 tables, 32 NDP units, 1 GB HRB, batch 64 in the test); the others are
// this design's choices, listed in the README.
module sage_top
  import sage_pkg::*;
#(
  parameter int unsigned     NUM_HOSTS   = 8,
  parameter int unsigned     NUM_TABLES  = 26,
  parameter int unsigned     N_IDS       = 64,
  parameter int unsigned     W           = 16,
  parameter int unsigned     K_TOP       = 4,
  parameter int unsigned     N_CLUST     = 8,
  parameter int unsigned     HRB_SLOTS   = 64,
  parameter longint unsigned HRB_BYTES   = 64'd1073741824,
  parameter logic [ALPHA_F:0] ALPHA      = 5'd8,
  parameter int unsigned     EMB_DIM     = 64,
  parameter int unsigned     DATA_W      = 16,
  parameter int unsigned     NDP_UNITS   = 32,
  parameter int unsigned     TOK_CAP     = 4,
  parameter int unsigned     QDEPTH      = 16,
  parameter int unsigned     ADDR_W      = 32,
  parameter int unsigned     ACC_W       = 40,
  localparam int unsigned    ENTRY_BYTES = EMB_DIM * DATA_W / 8,
  localparam int unsigned    F      = NUM_TABLES,
  localparam int unsigned    NPAIR  = F * (F - 1) / 2,
  localparam int unsigned    HW     = (NUM_HOSTS > 1) ? $clog2(NUM_HOSTS) : 1,
  localparam int unsigned    TW     = (NUM_TABLES > 1) ? $clog2(NUM_TABLES) : 1,
  localparam int unsigned    ID_W   = $clog2(N_IDS),
  localparam int unsigned    CW     = (N_CLUST > 1) ? $clog2(N_CLUST) : 1,
  localparam int unsigned    KW     = (TOK_CAP > 1) ? $clog2(TOK_CAP) : 1,
  localparam int unsigned    UW     = (NDP_UNITS > 1) ? $clog2(NDP_UNITS) : 1,
  localparam int unsigned    PW     = $clog2(NPAIR + 1),
  localparam int unsigned    DESC_W = F * ADDR_W,
  localparam int unsigned    QW     = $clog2(QDEPTH),
  localparam int unsigned    MAXF   = (W / 2) * ((W + 1) / 2),
  localparam int unsigned    FREQ_W = $clog2(MAXF + 1),
  localparam int unsigned    SZ_W   = $clog2(N_IDS + 1),
  localparam int unsigned    WP_W   = $clog2(W)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ---- embedding lookups of each host ----
  input  logic [NUM_HOSTS-1:0] h_lk_valid,
  output logic [NUM_HOSTS-1:0] h_lk_ready,
  input  logic [TW-1:0]        h_lk_table   [NUM_HOSTS],
  input  logic [ID_W-1:0]      h_lk_id      [NUM_HOSTS],
  output logic [NUM_HOSTS-1:0] h_lk_resp_valid,
  output hrb_res_e             h_lk_result  [NUM_HOSTS],
  output logic [CW-1:0]        h_lk_cluster [NUM_HOSTS],
  output logic [NUM_HOSTS-1:0] h_evict_valid,
  output logic [TW-1:0]        h_evict_table   [NUM_HOSTS],
  output logic [CW-1:0]        h_evict_cluster [NUM_HOSTS],
  output logic [BYTES_W-1:0]   h_evict_bytes   [NUM_HOSTS],
  input  logic [NUM_HOSTS-1:0] h_batch_end,
  // ---- prefetch windows ----
  input  logic [NUM_HOSTS-1:0] h_pf_start,
  input  logic [BYTES_W-1:0]   h_pf_budget [NUM_HOSTS],
  output logic [NUM_HOSTS-1:0] h_pf_done,
  output logic [BYTES_W-1:0]   h_pf_staged [NUM_HOSTS],
  output logic [15:0]          h_pf_admitted [NUM_HOSTS],
  // ---- HRB region sizes (cardinality-aware allocation) ----
  input  logic                 cfg_we,
  input  logic [HW-1:0]        cfg_host,
  input  logic [TW-1:0]        cfg_table,
  input  logic [BYTES_W-1:0]   cfg_cap,
  // ---- device-side predictor ----
  input  logic                 epoch_end,
  input  logic [BYTES_W-1:0]   stage_budget,
  output logic                 pred_busy,
  output logic                 pred_done,
  output logic [15:0]          pred_moved,
  output logic [31:0]          mon_dropped,
  // ---- look-ahead NDP tasks ----
  input  logic [NUM_HOSTS-1:0] h_task_valid,
  output logic [NUM_HOSTS-1:0] h_task_ready,
  input  logic [DESC_W-1:0]    h_task_desc [NUM_HOSTS],
  output logic [NUM_HOSTS-1:0] h_task_resp_valid,
  output logic [NUM_HOSTS-1:0] h_task_grant,
  output logic [KW-1:0]        h_task_slot [NUM_HOSTS],
  output logic [TOK_CAP-1:0]   h_task_done [NUM_HOSTS],
  input  logic [NUM_HOSTS-1:0] h_rel_valid,
  input  logic [KW-1:0]        h_rel_slot [NUM_HOSTS],
  input  logic [NUM_HOSTS-1:0] h_fb_valid,
  input  logic [NUM_HOSTS-1:0] h_fb_late,
  output logic [KW:0]          h_tok_budget [NUM_HOSTS],
  output logic [QW:0]          ndp_depth,
  // ---- results over CXL.mem ----
  input  logic                 res_rd_en,
  input  logic [HW-1:0]        res_rd_host,
  input  logic [KW-1:0]        res_rd_slot,
  input  logic [PW-1:0]        res_rd_idx,
  output logic [ACC_W-1:0]     res_rd_data,
  // ---- pooled memory (embedding rows) ----
  output logic                       mem_req_valid,
  input  logic                       mem_req_ready,
  output logic [ADDR_W-1:0]          mem_req_addr,
  output logic [UW-1:0]              mem_req_tag,
  input  logic                       mem_rsp_valid,
  input  logic [UW-1:0]              mem_rsp_tag,
  input  logic [EMB_DIM*DATA_W-1:0]  mem_rsp_data
);

  // ======================= device-side predictor =======================
  logic [CW-1:0]    part  [NUM_TABLES][N_IDS];
  logic [SZ_W-1:0]  csize [NUM_TABLES][N_CLUST];

  logic [NUM_TABLES-1:0] mon_valid, mon_ready;
  logic [HW-1:0]         mon_host;
  logic [TW-1:0]         mon_table;
  logic [ID_W-1:0]       mon_id;
  logic [NUM_HOSTS-1:0]  mon_in_valid;
  logic [31:0]           mon_count [NUM_HOSTS];

  locality_monitor #(.NUM_HOSTS(NUM_HOSTS), .NUM_TABLES(NUM_TABLES), .ID_W(ID_W)) u_monitor (
    .clk, .rst_n, .in_valid(mon_in_valid), .in_table(h_lk_table), .in_id(h_lk_id),
    .out_valid(mon_valid), .out_ready(mon_ready), .out_host(mon_host),
    .out_table(mon_table), .out_id(mon_id), .host_count(mon_count),
    .drop_count(mon_dropped));

  // sequencing: epoch_end -> re-cluster all tables -> rank all tables
  typedef enum logic [1:0] {P_IDLE, P_MODEL, P_RANK} pstate_e;
  pstate_e               pstate;
  logic                  model_start, rank_start;
  logic [NUM_TABLES-1:0] model_busy, model_done_v, rank_busy, rank_done_v;
  logic [NUM_TABLES-1:0] model_fin, rank_fin;
  logic [15:0]           moved [NUM_TABLES];

  // ranked candidates of every table
  logic [NUM_TABLES-1:0] rk_valid, rk_ready;
  logic [CW-1:0]         rk_cluster [NUM_TABLES];
  logic [SCORE_W-1:0]    rk_score   [NUM_TABLES];
  logic [BYTES_W-1:0]    rk_bytes   [NUM_TABLES];

  for (genvar t = 0; t < NUM_TABLES; t++) begin : g_table
    logic [ID_W-1:0]   mi, mj, ri, rj;
    logic [FREQ_W-1:0] mf, rf, fmax;
    logic [ID_W-1:0]   win_id [W];
    logic [WP_W:0]     win_cnt;
    logic [WP_W-1:0]   win_head;
    logic [N_IDS-1:0]  dirty;
    logic              dirty_clr, cbusy;

    cooc_window #(.N_IDS(N_IDS), .W(W)) u_window (
      .clk, .rst_n, .acc_valid(mon_valid[t]), .acc_ready(mon_ready[t]), .acc_id(mon_id),
      .rda_i(mi), .rda_j(mj), .rda_freq(mf), .rdb_i(ri), .rdb_j(rj), .rdb_freq(rf),
      .freq_max(fmax), .win_id, .win_cnt, .win_head, .dirty, .dirty_clr, .busy(cbusy));

    cluster_model #(.N_IDS(N_IDS), .K_TOP(K_TOP), .N_CLUST(N_CLUST), .FREQ_W(FREQ_W)) u_model (
      .clk, .rst_n, .start(model_start), .dirty, .dirty_clr, .rd_i(mi), .rd_j(mj),
      .rd_freq(mf), .freq_max(fmax), .part(part[t]), .csize(csize[t]),
      .done(model_done_v[t]), .busy(model_busy[t]), .n_moved(moved[t]));

    cluster_ranker #(.N_IDS(N_IDS), .W(W), .N_CLUST(N_CLUST), .FREQ_W(FREQ_W),
                     .ALPHA(ALPHA), .ENTRY_BYTES(ENTRY_BYTES)) u_ranker (
      .clk, .rst_n, .start(rank_start), .budget(stage_budget),
      .win_id, .win_cnt, .win_head, .part(part[t]), .csize(csize[t]),
      .rd_i(ri), .rd_j(rj), .rd_freq(rf), .freq_max(fmax),
      .cand_valid(rk_valid[t]), .cand_ready(rk_ready[t]), .cand_cluster(rk_cluster[t]),
      .cand_score(rk_score[t]), .cand_bytes(rk_bytes[t]),
      .done(rank_done_v[t]), .busy(rank_busy[t]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate <= P_IDLE; model_start <= 1'b0; rank_start <= 1'b0; pred_done <= 1'b0;
      model_fin <= '0; rank_fin <= '0;
    end else begin
      model_start <= 1'b0; rank_start <= 1'b0; pred_done <= 1'b0;
      unique case (pstate)
        P_IDLE: if (epoch_end) begin
          model_start <= 1'b1; model_fin <= '0; pstate <= P_MODEL;
        end
        P_MODEL: begin
          if ((model_fin | model_done_v) == '1 && !model_start) begin
            rank_start <= 1'b1; rank_fin <= '0; pstate <= P_RANK;
          end else model_fin <= model_fin | model_done_v;
        end
        P_RANK: begin
          if ((rank_fin | rank_done_v) == '1 && !rank_start) begin
            pred_done <= 1'b1; pstate <= P_IDLE;
          end else rank_fin <= rank_fin | rank_done_v;
        end
        default: pstate <= P_IDLE;
      endcase
    end
  end
  assign pred_busy = (pstate != P_IDLE);

  always_comb begin
    pred_moved = '0;
    for (int t = 0; t < NUM_TABLES; t++) pred_moved = pred_moved + moved[t];
  end

  // merge the per-table lists into one broadcast stream
  logic [NUM_TABLES-1:0] rk_grant;
  logic [TW-1:0]         rk_sel;
  logic                  rk_any, bc_ready;
  rr_arbiter #(.N(NUM_TABLES)) u_rank_arb (
    .clk, .rst_n, .req(rk_valid), .advance(bc_ready), .grant(rk_grant),
    .grant_idx(rk_sel), .any(rk_any));
  assign rk_ready = bc_ready ? rk_grant : '0;

  // ======================= host side =======================
  logic [NUM_HOSTS-1:0] pf_cand_ready, pf_walking;
  always_comb begin
    bc_ready = 1'b1;
    for (int h = 0; h < NUM_HOSTS; h++) if (pf_walking[h] && !pf_cand_ready[h]) bc_ready = 1'b0;
  end

  for (genvar h = 0; h < NUM_HOSTS; h++) begin : g_host
    logic                 dem_valid, dem_ready, pf_valid, pf_ready, resp_valid;
    logic [TW-1:0]        pf_table, resp_table;
    logic [CW-1:0]        pf_cluster, dem_cluster, resp_cluster;
    logic [BYTES_W-1:0]   pf_bytes, dem_bytes;
    hrb_op_e              resp_op;
    hrb_res_e             resp_result;
    logic [BYTES_W-1:0]   used [NUM_TABLES];
    logic                 cbusy;
    logic [15:0]          n_skip, n_drop;

    // cluster of the looked-up identifier, from the device's partition
    assign dem_cluster = part[h_lk_table[h]][h_lk_id[h]];
    assign dem_bytes   = BYTES_W'(csize[h_lk_table[h]][dem_cluster]) * BYTES_W'(ENTRY_BYTES);
    // a lookup taken by the cache is also reported to the device monitor
    assign dem_valid        = h_lk_valid[h];
    assign mon_in_valid[h]  = h_lk_valid[h] && dem_ready;
    assign h_lk_ready[h]    = dem_ready;

    hrb_group_cache #(.NUM_TABLES(NUM_TABLES), .CLUSTER_W(CW), .SLOTS(HRB_SLOTS),
                      .HRB_BYTES(HRB_BYTES)) u_hrb (
      .clk, .rst_n, .dem_valid, .dem_ready, .dem_table(h_lk_table[h]), .dem_cluster, .dem_bytes,
      .pf_valid, .pf_ready, .pf_table, .pf_cluster, .pf_bytes,
      .resp_valid, .resp_op, .resp_result, .resp_table, .resp_cluster,
      .evict_valid(h_evict_valid[h]), .evict_table(h_evict_table[h]),
      .evict_cluster(h_evict_cluster[h]), .evict_bytes(h_evict_bytes[h]),
      .batch_end(h_batch_end[h]),
      .cfg_we(cfg_we && cfg_host == HW'(h)), .cfg_table, .cfg_cap,
      .used_bytes(used), .busy(cbusy));

    assign h_lk_resp_valid[h] = resp_valid && resp_op == OP_DEMAND;
    assign h_lk_result[h]     = resp_result;
    assign h_lk_cluster[h]    = resp_cluster;

    ctx_prefetcher #(.NUM_TABLES(NUM_TABLES), .CLUSTER_W(CW)) u_pf (
      .clk, .rst_n, .win_start(h_pf_start[h]), .win_budget(h_pf_budget[h]),
      .cand_valid(rk_any && bc_ready), .cand_ready(pf_cand_ready[h]),
      .cand_table(rk_sel), .cand_cluster(rk_cluster[rk_sel]),
      .cand_score(rk_score[rk_sel]), .cand_bytes(rk_bytes[rk_sel]),
      .cand_end(pred_done),
      .pf_valid, .pf_ready, .pf_table, .pf_cluster, .pf_bytes,
      .resp_valid, .resp_op, .resp_result,
      .done(h_pf_done[h]), .walking(pf_walking[h]), .staged_bytes(h_pf_staged[h]),
      .n_admitted(h_pf_admitted[h]), .n_skipped(n_skip), .n_dropped(n_drop));
  end

  // ======================= look-ahead NDP =======================
  logic [NDP_UNITS-1:0] u_idle, u_start, u_done, u_mreq, u_res;
  logic [DESC_W-1:0]    u_desc;
  logic [HW+KW-1:0]     u_tag;
  logic [HW+KW-1:0]     u_done_tag [NDP_UNITS];
  logic [ADDR_W-1:0]    u_addr     [NDP_UNITS];
  logic [HW+KW-1:0]     u_res_tag  [NDP_UNITS];
  logic [PW-1:0]        u_res_idx  [NDP_UNITS];
  logic signed [ACC_W-1:0] u_res_data [NDP_UNITS];
  logic [NDP_UNITS-1:0] mreq_grant, res_grant;
  logic [UW-1:0]        mreq_sel, res_sel;
  logic                 mreq_any, res_any;
  logic [31:0]          n_granted, n_refused;

  ndp_token_scheduler #(.NUM_HOSTS(NUM_HOSTS), .TOK_CAP(TOK_CAP), .QDEPTH(QDEPTH),
                        .NUM_UNITS(NDP_UNITS), .DESC_W(DESC_W)) u_sched (
    .clk, .rst_n, .req_valid(h_task_valid), .req_ready(h_task_ready), .req_desc(h_task_desc),
    .resp_valid(h_task_resp_valid), .resp_grant(h_task_grant), .resp_slot(h_task_slot),
    .done_mask(h_task_done), .rel_valid(h_rel_valid), .rel_slot(h_rel_slot),
    .fb_valid(h_fb_valid), .fb_late(h_fb_late), .budget(h_tok_budget),
    .unit_idle(u_idle), .unit_start(u_start), .unit_desc(u_desc), .unit_tag(u_tag),
    .unit_done(u_done), .unit_done_tag(u_done_tag), .depth(ndp_depth),
    .n_granted, .n_refused);

  for (genvar u = 0; u < NDP_UNITS; u++) begin : g_ndp
    lookahead_ndp #(.F(F), .EMB_DIM(EMB_DIM), .DATA_W(DATA_W), .ADDR_W(ADDR_W),
                    .ACC_W(ACC_W), .TAG_W(HW + KW)) u_unit (
      .clk, .rst_n, .start(u_start[u]), .desc(u_desc), .tag(u_tag), .idle(u_idle[u]),
      .mem_req_valid(u_mreq[u]), .mem_req_ready(mreq_grant[u] && mem_req_ready),
      .mem_req_addr(u_addr[u]),
      .mem_rsp_valid(mem_rsp_valid && mem_rsp_tag == UW'(u)), .mem_rsp_data,
      .res_valid(u_res[u]), .res_ready(res_grant[u]), .res_tag(u_res_tag[u]),
      .res_idx(u_res_idx[u]), .res_data(u_res_data[u]),
      .done(u_done[u]), .done_tag(u_done_tag[u]));
  end

  rr_arbiter #(.N(NDP_UNITS)) u_mem_arb (
    .clk, .rst_n, .req(u_mreq), .advance(mem_req_ready), .grant(mreq_grant),
    .grant_idx(mreq_sel), .any(mreq_any));
  assign mem_req_valid = mreq_any;
  assign mem_req_addr  = u_addr[mreq_sel];
  assign mem_req_tag   = mreq_sel;

  rr_arbiter #(.N(NDP_UNITS)) u_res_arb (
    .clk, .rst_n, .req(u_res), .advance(1'b1), .grant(res_grant),
    .grant_idx(res_sel), .any(res_any));

  ndp_result_buffer #(.NUM_HOSTS(NUM_HOSTS), .TOK_CAP(TOK_CAP), .NPAIR(NPAIR), .ACC_W(ACC_W)) u_results (
    .clk, .we(res_any), .wr_host(u_res_tag[res_sel][HW+KW-1 -: HW]),
    .wr_slot(u_res_tag[res_sel][KW-1:0]), .wr_idx(u_res_idx[res_sel]),
    .wr_data(u_res_data[res_sel]),
    .rd_en(res_rd_en), .rd_host(res_rd_host), .rd_slot(res_rd_slot), .rd_idx(res_rd_idx),
    .rd_data(res_rd_data));

endmodule
