// Self-checking testbench of ctx_prefetcher, run against the real group
// cache: two prefetch windows with hand-worked expectations for skipped
// (resident) clusters, admitted clusters, the byte budget stopping the walk,
// and prefetch admissions that evict unpinned clusters from the LRU tail.
module tb_ctx_prefetcher;
  import sage_pkg::*;
  localparam int CW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic win_start, cand_valid, cand_ready, cand_end, done, walking;
  logic [31:0] win_budget, cand_bytes, staged_bytes;
  logic [0:0] cand_table, pf_table;
  logic [CW-1:0] cand_cluster, pf_cluster;
  logic [SCORE_W-1:0] cand_score;
  logic pf_valid, pf_ready, resp_valid;
  logic [31:0] pf_bytes;
  hrb_op_e resp_op; hrb_res_e resp_result;
  logic [15:0] n_admitted, n_skipped, n_dropped;

  // group cache with one table region of 1000 bytes
  logic dem_valid, dem_ready, evict_valid, busy, batch_end;
  logic [CW-1:0] dem_cluster, resp_cluster, evict_cluster;
  logic [0:0] resp_table, evict_table;
  logic [31:0] dem_bytes, evict_bytes, used_bytes [1];
  int n_evict = 0;
  always @(posedge clk) if (rst_n && evict_valid) n_evict++;

  ctx_prefetcher #(.NUM_TABLES(1), .CLUSTER_W(CW)) dut (.*);
  hrb_group_cache #(.NUM_TABLES(1), .CLUSTER_W(CW), .SLOTS(8), .HRB_BYTES(1000)) cache (
    .clk, .rst_n, .dem_valid, .dem_ready, .dem_table(1'b0), .dem_cluster, .dem_bytes,
    .pf_valid, .pf_ready, .pf_table, .pf_cluster, .pf_bytes,
    .resp_valid, .resp_op, .resp_result, .resp_table, .resp_cluster,
    .evict_valid, .evict_table, .evict_cluster, .evict_bytes,
    .batch_end, .cfg_we(1'b0), .cfg_table(1'b0), .cfg_cap(32'd0), .used_bytes, .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input int c, input int b, input int sc);
    @(negedge clk); cand_valid = 1; cand_cluster = CW'(c); cand_bytes = b; cand_score = SCORE_W'(sc);
    @(posedge clk); while (!cand_ready) @(posedge clk);
    @(negedge clk); cand_valid = 0;
  endtask

  task automatic open_window(input int b);
    @(negedge clk); win_start = 1; win_budget = b; @(negedge clk); win_start = 0;
  endtask

  task automatic finish_list(input int adm, input int skp, input int drp, input int stg);
    int n = 0;
    @(negedge clk); cand_end = 1; @(negedge clk); cand_end = 0;
    while (!done && n < 1000) begin @(negedge clk); n++; end
    check(done, "window finishes");
    check(n_admitted == 16'(adm), $sformatf("admitted %0d expected %0d", n_admitted, adm));
    check(n_skipped == 16'(skp), $sformatf("skipped %0d expected %0d", n_skipped, skp));
    check(n_dropped == 16'(drp), $sformatf("dropped %0d expected %0d", n_dropped, drp));
    check(staged_bytes == stg, $sformatf("staged %0d expected %0d", staged_bytes, stg));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    win_start = 0; win_budget = 0; cand_valid = 0; cand_end = 0; cand_table = 0;
    cand_cluster = 0; cand_bytes = 0; cand_score = 0; dem_valid = 0; dem_cluster = 0;
    dem_bytes = 0; batch_end = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // demand-admit cluster 1 (300 B), pinned for the current batch
    @(negedge clk); dem_valid = 1; dem_cluster = 1; dem_bytes = 300;
    @(negedge clk); dem_valid = 0; repeat (4) @(negedge clk);
    check(used_bytes[0] == 300, "demand admission");
    // window 1: budget 700 bytes
    open_window(700);
    send(1, 300, 90);   // resident: skipped by the cache
    send(2, 300, 80);   // staged (300)
    send(3, 300, 70);   // staged (600)
    send(4, 200, 60);   // 800 > 700: budget met, dropped
    send(5, 50, 50);    // after the budget is met: dropped
    finish_list(2, 1, 2, 600);
    check(used_bytes[0] == 900 && n_evict == 0, "window 1 occupancy");
    // window 2: cluster 6 (500 B) needs c2 and c3 evicted, c1 is pinned
    open_window(2000);
    send(6, 500, 99);
    finish_list(1, 0, 0, 500);
    check(n_evict == 2 && used_bytes[0] == 800, $sformatf("window 2 evictions %0d used %0d", n_evict, used_bytes[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
