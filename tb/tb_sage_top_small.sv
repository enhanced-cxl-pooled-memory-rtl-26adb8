// End-to-end testbench of sage_top in a reduced configuration (2 hosts, 4
// tables of 16 identifiers in 4 clusters, 8-element rows, 2 NDP units, 2
// tokens per host, six rows of HRB per table) so that it builds and runs in seconds; tb_sage_top
// runs the same sequence at the default sizes.  Here the clusters the
// ranker names are the ones just used and still resident, so the prefetch
// walk is checked to skip them; admission is checked in tb_sage_top.  One complete operation:
//   1. batch 0: every host looks up 64 samples x 26 tables with contextual
//      locality (samples of one context share a small set of identifiers);
//   2. batch end, prefetch windows open, the device re-clusters and ranks,
//      every host stages the ranked clusters under its byte budget;
//   3. batch 1: the same kind of lookups, now partly served from prefetched
//      clusters;
//   4. look-ahead NDP: hosts offload sparse-interaction tasks, some refused
//      for lack of tokens, results read back and checked against dot
//      products computed here from the pooled-memory formula; token budgets
//      adapt to late and early feedback.
// Host 0's table-0 region is shrunk to half a row (every lookup must bypass)
// and its table-1 region to 8 rows (clusters must evict each other).  Each
// mechanism is counted and a failure is counted for any that never occurs.
module tb_sage_top_small;
  import sage_pkg::*;
  localparam int NH = 2, NT = 4, NI = 16, NC = 4, NU = 2, TK = 2, F = NT;
  localparam int D = 8, DW = 16, AW = 32, ACW = 40, NP = F * (F - 1) / 2;
  localparam int BATCH = 16, QD = 4, WATCHDOG = 200000, WIN = 8, SLOTS = 16;
  localparam int HW = (NH > 1) ? $clog2(NH) : 1, TW = $clog2(NT), IW = $clog2(NI);
  localparam int CW = $clog2(NC), KW = (TK > 1) ? $clog2(TK) : 1, UW = $clog2(NU);
  localparam int PW = $clog2(NP + 1), QW = $clog2(QD);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NH-1:0] h_lk_valid, h_lk_ready, h_lk_resp_valid, h_evict_valid, h_batch_end;
  logic [TW-1:0] h_lk_table [NH];
  logic [IW-1:0] h_lk_id [NH];
  hrb_res_e h_lk_result [NH];
  logic [CW-1:0] h_lk_cluster [NH], h_evict_cluster [NH];
  logic [TW-1:0] h_evict_table [NH];
  logic [31:0] h_evict_bytes [NH];
  logic [NH-1:0] h_pf_start, h_pf_done;
  logic [31:0] h_pf_budget [NH], h_pf_staged [NH];
  logic [15:0] h_pf_admitted [NH];
  logic cfg_we; logic [HW-1:0] cfg_host; logic [TW-1:0] cfg_table; logic [31:0] cfg_cap;
  logic epoch_end, pred_busy, pred_done; logic [31:0] stage_budget; logic [15:0] pred_moved; logic [31:0] mon_dropped;
  logic [NH-1:0] h_task_valid, h_task_ready, h_task_resp_valid, h_task_grant, h_rel_valid, h_fb_valid, h_fb_late;
  logic [F*AW-1:0] h_task_desc [NH];
  logic [KW-1:0] h_task_slot [NH], h_rel_slot [NH];
  logic [TK-1:0] h_task_done [NH];
  logic [KW:0] h_tok_budget [NH];
  logic [QW:0] ndp_depth;
  logic res_rd_en; logic [HW-1:0] res_rd_host; logic [KW-1:0] res_rd_slot; logic [PW-1:0] res_rd_idx;
  logic [ACW-1:0] res_rd_data;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [AW-1:0] mem_req_addr; logic [UW-1:0] mem_req_tag, mem_rsp_tag;
  logic [D*DW-1:0] mem_rsp_data;

  sage_top #(.NUM_HOSTS(NH), .NUM_TABLES(NT), .N_IDS(NI), .W(WIN), .K_TOP(4),
             .N_CLUST(NC), .HRB_SLOTS(SLOTS), .HRB_BYTES(64'(NT * 6 * D * DW / 8)), .EMB_DIM(D), .NDP_UNITS(NU),
             .TOK_CAP(TK), .QDEPTH(QD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- pooled memory model: 20-cycle latency, in order ----------------
  function automatic int elem(input int addr, input int d);
    return ((addr * 29 + d * 13) % 401) - 200;
  endfunction
  function automatic logic [D*DW-1:0] row(input int addr);
    logic [D*DW-1:0] r;
    for (int d = 0; d < D; d++) r[d*DW +: DW] = DW'(elem(addr, d));
    return r;
  endfunction
  int mq_t[$]; int mq_a[$]; int mq_g[$];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    mem_rsp_valid <= 1'b0;
    if (mq_t.size() > 0 && longint'(mq_t[0]) <= cyc) begin
      void'(mq_t.pop_front());
      mem_rsp_valid <= 1'b1; mem_rsp_tag <= UW'(mq_g.pop_front()); mem_rsp_data <= row(mq_a.pop_front());
    end
    if (mem_req_valid && mem_req_ready) begin
      mq_t.push_back(int'(cyc) + 20); mq_a.push_back(int'(mem_req_addr)); mq_g.push_back(int'(mem_req_tag));
    end
  end
  always @(negedge clk) mem_req_ready = ($urandom % 4 != 0);

  // ---------------- mechanism counters ----------------
  int n_hit = 0, n_admit = 0, n_bypass = 0, n_evict = 0, n_lk = 0;
  int hit_b [2] = '{0, 0};
  int batch = 0;
  int bad_bypass = 0, t0_lookups = 0;
  always @(posedge clk) if (rst_n) for (int h = 0; h < NH; h++) begin
    if (h_lk_resp_valid[h]) begin
      n_lk++;
      case (h_lk_result[h])
        RES_HIT:    begin n_hit++; hit_b[batch]++; end
        RES_ADMIT:  n_admit++;
        RES_BYPASS: n_bypass++;
        default:    check(0, "demand answered with SKIP");
      endcase
    end
    if (h_evict_valid[h]) n_evict++;
  end
  // host 0 table 0 must always bypass
  logic [TW-1:0] h0_last_table;
  always @(posedge clk) if (rst_n) begin
    if (h_lk_valid[0] && h_lk_ready[0]) h0_last_table <= h_lk_table[0];
    if (h_lk_resp_valid[0] && h0_last_table == '0) begin
      t0_lookups++; if (h_lk_result[0] != RES_BYPASS) bad_bypass++;
    end
  end

  // ---------------- host lookup drivers ----------------
  function automatic int ctx_id(input int h, input int s, input int t, input int b);
    int c;
    c = (s * 5 + h * 3 + b) % NC;
    return (c * (NI / NC) + (t + s) % 3) % NI;
  endfunction
  task automatic host_batch(input int h, input int b);
    for (int s = 0; s < BATCH; s++) for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      h_lk_valid[h] = 1; h_lk_table[h] = TW'(t); h_lk_id[h] = IW'(ctx_id(h, s, t, b));
      @(posedge clk); #1; while (!h_lk_ready[h]) begin @(posedge clk); #1; end
      @(negedge clk); h_lk_valid[h] = 0;
    end
  endtask
  task automatic all_batch(input int b);
    for (int h = 0; h < NH; h++) begin
      automatic int hh = h;
      fork host_batch(hh, b); join_none
    end
    wait fork;
    repeat (10) @(negedge clk);
  endtask

  // ---------------- NDP task helpers ----------------
  task automatic make_desc(input int h, input int s, output logic [F*AW-1:0] d);
    for (int t = 0; t < F; t++) d[t*AW +: AW] = AW'(t * 65536 + ctx_id(h, s, t, 1));
  endtask
  task automatic offload(input int h, input int s, output bit g, output int slot);
    logic [F*AW-1:0] d;
    make_desc(h, s, d);
    @(negedge clk); h_task_valid[h] = 1; h_task_desc[h] = d;
    @(posedge clk); #1; while (!h_task_ready[h]) begin @(posedge clk); #1; end
    @(negedge clk); h_task_valid[h] = 0;
    g = h_task_grant[h]; slot = int'(h_task_slot[h]);
  endtask
  logic [TK-1:0] done_seen [NH];
  always @(posedge clk) if (rst_n) for (int h = 0; h < NH; h++) done_seen[h] <= done_seen[h] | h_task_done[h];

  task automatic read_check(input int h, input int slot, input int s, input int idx);
    int a, b; longint e; logic [F*AW-1:0] d;
    make_desc(h, s, d);
    a = 0; b = 1;
    for (int k = 0; k < idx; k++) begin b++; if (b == F) begin a++; b = a + 1; end end
    e = 0;
    for (int x = 0; x < D; x++) e += longint'(elem(int'(d[a*AW +: AW]), x)) * longint'(elem(int'(d[b*AW +: AW]), x));
    @(negedge clk); res_rd_en = 1; res_rd_host = HW'(h); res_rd_slot = KW'(slot); res_rd_idx = PW'(idx);
    @(negedge clk); res_rd_en = 0;
    check(longint'($signed(res_rd_data)) == e, $sformatf("host %0d slot %0d pair %0d: %0d expected %0d", h, slot, idx, $signed(res_rd_data), e));
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    static int n_grant = 0, n_refuse = 0, n_pf_adm = 0, moved0 = 0, staged_total = 0;
    int granted_slot [NH][$]; int granted_smp [NH][$];
    h_lk_valid = '0; h_batch_end = '0; h_pf_start = '0; cfg_we = 0; cfg_host = '0; cfg_table = '0; cfg_cap = 0;
    epoch_end = 0; stage_budget = 32'd4096; h_task_valid = '0; h_rel_valid = '0; h_fb_valid = '0; h_fb_late = '0;
    res_rd_en = 0; res_rd_host = '0; res_rd_slot = '0; res_rd_idx = '0; mem_rsp_valid = 0; mem_rsp_tag = '0; mem_rsp_data = '0;
    for (int h = 0; h < NH; h++) begin
      h_lk_table[h] = '0; h_lk_id[h] = '0; h_pf_budget[h] = 32'd16384; h_task_desc[h] = '0; h_rel_slot[h] = '0; done_seen[h] = '0;
    end
    repeat (5) @(posedge clk); rst_n = 1;
    // region sizes of host 0: table 0 too small for any cluster, table 1 one cluster
    @(negedge clk); cfg_we = 1; cfg_host = '0; cfg_table = '0; cfg_cap = D * DW / 16;
    @(negedge clk); cfg_table = TW'(1); cfg_cap = 8 * D * DW / 8;
    @(negedge clk); cfg_we = 0;
    // wait for the co-occurrence arrays to clear
    repeat (NI * NI + 10) @(negedge clk);

    // ---- batch 0 ----
    all_batch(0);
    check(n_lk == NH * BATCH * NT, $sformatf("batch 0: %0d lookups answered", n_lk));
    @(negedge clk); h_batch_end = '1; @(negedge clk); h_batch_end = '0;

    // ---- prediction and prefetch ----
    @(negedge clk); h_pf_start = '1; @(negedge clk); h_pf_start = '0;
    moved0 = int'(pred_moved);
    @(negedge clk); epoch_end = 1; @(negedge clk); epoch_end = 0;
    check(pred_busy, "predictor busy after epoch end");
    while (!pred_done) @(negedge clk);
    for (int w = 0; w < 200 && h_pf_done != '1; w++) @(negedge clk);
    check(h_pf_done == '1, "every prefetch window finished");
    for (int h = 0; h < NH; h++) begin
      n_pf_adm += int'(h_pf_admitted[h]); staged_total += int'(h_pf_staged[h]);
      check(h_pf_staged[h] <= h_pf_budget[h], "prefetch within budget");
    end
    $display("prediction: %0d identifiers moved, %0d clusters staged (%0d bytes)", int'(pred_moved) - moved0, n_pf_adm, staged_total);

    // ---- batch 1 ----
    batch = 1;
    all_batch(1);
    check(n_lk == 2 * NH * BATCH * NT, "batch 1: all lookups answered");
    check(bad_bypass == 0 && t0_lookups == 2 * BATCH, $sformatf("host 0 table 0: %0d of %0d lookups not bypassed", bad_bypass, t0_lookups));

    // ---- look-ahead NDP ----
    for (int h = 0; h < NH; h++) for (int s = 0; s < TK + 1; s++) begin
      bit g; int sl;
      offload(h, s, g, sl);
      if (g) begin n_grant++; granted_slot[h].push_back(sl); granted_smp[h].push_back(s); end
      else n_refuse++;
    end
    for (int w = 0; w < 100000; w++) begin
      bit all_done; all_done = 1;
      for (int h = 0; h < NH; h++) foreach (granted_slot[h][k]) if (!done_seen[h][granted_slot[h][k]]) all_done = 0;
      if (all_done) break;
      @(negedge clk);
    end
    for (int h = 0; h < NH; h++) foreach (granted_slot[h][k]) begin
      check(done_seen[h][granted_slot[h][k]], "task completed");
      read_check(h, granted_slot[h][k], granted_smp[h][k], 0);
      read_check(h, granted_slot[h][k], granted_smp[h][k], 1);
      read_check(h, granted_slot[h][k], granted_smp[h][k], NP / 2);
      read_check(h, granted_slot[h][k], granted_smp[h][k], NP - 1);
    end
    // consume results, return the tokens, report lateness
    for (int h = 0; h < NH; h++) foreach (granted_slot[h][k]) begin
      @(negedge clk); h_rel_valid[h] = 1; h_rel_slot[h] = KW'(granted_slot[h][k]); @(negedge clk); h_rel_valid = '0;
    end
    @(negedge clk); h_fb_valid = '1; for (int h = 0; h < NH; h++) h_fb_late[h] = (h < NH / 2); @(negedge clk); h_fb_valid = '0;
    check(int'(h_tok_budget[0]) == TK - 1 && int'(h_tok_budget[NH-1]) == TK, "token budgets adapt to feedback");

    // ---- mechanism report ----
    $display("monitor dropped %0d reports", mon_dropped);
    $display("hits %0d (batch0 %0d, batch1 %0d) admits %0d bypass %0d evictions %0d prefetched %0d ndp granted %0d refused %0d",
             n_hit, hit_b[0], hit_b[1], n_admit, n_bypass, n_evict, n_pf_adm, n_grant, n_refuse);
    check(n_hit > 0, "HRB hit happened");
    check(n_admit > 0, "whole-cluster admission happened");
    check(n_bypass > 0, "bypass happened");
    check(n_evict > 0, "group-LRU eviction happened");
    check(n_pf_adm + int'(dut.g_host[0].n_skip) > 0, "prefetch walk resolved candidates");
    check(int'(pred_moved) > moved0, "re-clustering moved identifiers");
    check(n_grant > 0, "NDP task granted");
    check(n_refuse > 0, "NDP task refused (host fallback)");
    check(mon_dropped > 0, "monitor sampled under contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
