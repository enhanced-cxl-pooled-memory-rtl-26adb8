// Self-checking testbench of hrb_group_cache: a directed sequence with the
// expected outcome of every request worked out by hand from the group-LRU
// rules (whole-cluster admission, LRU-tail eviction of unpinned clusters,
// bypass when a cluster cannot fit, prefetch skip, per-table regions, slot
// exhaustion).  Also checks the hit latency of 2 cycles after acceptance.
module tb_hrb_group_cache;
  import sage_pkg::*;
  localparam int NT = 2, CW = 3, SL = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dem_valid, dem_ready, pf_valid, pf_ready;
  logic [0:0] dem_table, pf_table, resp_table, evict_table, cfg_table;
  logic [CW-1:0] dem_cluster, pf_cluster, resp_cluster, evict_cluster;
  logic [31:0] dem_bytes, pf_bytes, evict_bytes, cfg_cap;
  logic resp_valid, evict_valid, batch_end, cfg_we, busy;
  hrb_op_e resp_op; hrb_res_e resp_result;
  logic [31:0] used_bytes [NT];

  hrb_group_cache #(.NUM_TABLES(NT), .CLUSTER_W(CW), .SLOTS(SL), .HRB_BYTES(1000)) dut (.*);

  int checks = 0, failures = 0;
  int ev_q[$];
  always @(posedge clk) if (evict_valid) ev_q.push_back({evict_table, evict_cluster});

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic req(input hrb_op_e op, input int t, input int c, input int b,
                     input hrb_res_e exp, input int n_ev, input int ev0 = 0,
                     input int ev1 = 0, input int exp_lat = -1);
    int exp_ev[2];
    int lat = 0;
    exp_ev[0] = ev0; exp_ev[1] = ev1;
    ev_q.delete();
    @(negedge clk);
    if (op == OP_DEMAND) begin dem_valid = 1; dem_table = 1'(t); dem_cluster = CW'(c); dem_bytes = b; end
    else begin pf_valid = 1; pf_table = 1'(t); pf_cluster = CW'(c); pf_bytes = b; end
    @(posedge clk); while (!(op == OP_DEMAND ? dem_ready : pf_ready)) @(posedge clk);
    @(negedge clk); dem_valid = 0; pf_valid = 0;
    while (!resp_valid) begin @(negedge clk); lat++; end
    check(resp_result == exp, $sformatf("op %0d t%0d c%0d: result %s expected %s", op, t, c, resp_result.name(), exp.name()));
    check(resp_op == op && resp_table == 1'(t) && resp_cluster == CW'(c), "response tags");
    check(ev_q.size() == n_ev, $sformatf("t%0d c%0d: %0d evictions, expected %0d", t, c, ev_q.size(), n_ev));
    for (int i = 0; i < n_ev; i++) if (i < ev_q.size()) check(ev_q[i] == exp_ev[i], $sformatf("eviction %0d is %0h expected %0h", i, ev_q[i], exp_ev[i]));
    if (exp_lat >= 0) check(lat + 1 == exp_lat, $sformatf("latency %0d expected %0d", lat + 1, exp_lat));
  endtask

  task automatic end_batch();
    @(negedge clk); batch_end = 1; @(negedge clk); batch_end = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    dem_valid = 0; pf_valid = 0; batch_end = 0; cfg_we = 0;
    dem_table = 0; dem_cluster = 0; dem_bytes = 0; pf_table = 0; pf_cluster = 0; pf_bytes = 0;
    cfg_table = 0; cfg_cap = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // each table region gets 1000/2 = 500 bytes
    req(OP_DEMAND, 0, 1, 200, RES_ADMIT, 0);
    req(OP_DEMAND, 0, 2, 200, RES_ADMIT, 0);
    req(OP_DEMAND, 0, 1, 200, RES_HIT, 0, 0, 0, 2);
    check(used_bytes[0] == 400, "used bytes of table 0");
    end_batch();
    req(OP_DEMAND, 0, 2, 200, RES_HIT, 0);                 // c2 now more recent than c1
    req(OP_PREFETCH, 0, 3, 200, RES_ADMIT, 1, 'h1);         // evicts LRU c1, c2 pinned
    req(OP_PREFETCH, 0, 2, 200, RES_SKIP, 0, 0, 0, 2);           // resident
    req(OP_DEMAND, 0, 4, 400, RES_BYPASS, 0);              // 400 + pinned 200 > 500
    check(used_bytes[0] == 400, "bypass evicts nothing");
    end_batch();
    req(OP_DEMAND, 0, 4, 400, RES_ADMIT, 2, 'h2, 'h3);       // LRU order c2 then c3
    check(used_bytes[0] == 400, "used after group eviction");
    req(OP_DEMAND, 1, 4, 300, RES_ADMIT, 0);               // separate region, same cluster number
    req(OP_DEMAND, 0, 4, 400, RES_HIT, 0);
    @(negedge clk); cfg_we = 1; cfg_table = 1; cfg_cap = 100; @(negedge clk); cfg_we = 0;
    req(OP_DEMAND, 1, 5, 200, RES_BYPASS, 0);
    @(negedge clk); cfg_we = 1; cfg_table = 1; cfg_cap = 10000; @(negedge clk); cfg_we = 0;
    end_batch();
    req(OP_DEMAND, 1, 2, 10, RES_ADMIT, 0);
    req(OP_DEMAND, 1, 3, 10, RES_ADMIT, 0);                // all 4 slots used
    end_batch();
    req(OP_DEMAND, 1, 6, 10, RES_ADMIT, 1, 'hC);            // no free slot: evict t1 LRU (c4)
    req(OP_DEMAND, 0, 7, 10, RES_ADMIT, 1, 'h04);            // no free slot: evict t0 c4
    check(used_bytes[0] == 10 && used_bytes[1] == 30, "final occupancy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
