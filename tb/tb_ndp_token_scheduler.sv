// Self-checking testbench of ndp_token_scheduler (2 hosts, 8 tokens, queue
// of 4, one NDP unit modelled here).
//   Phase 1, unit always idle (queue stays empty, so every request with a
//   free token must be granted): token exhaustion refuses, release gives the
//   token back, late feedback lowers the budget, early feedback raises it,
//   the budget stays within 1..TOK_CAP, completions reach the right host and
//   slot through done_mask.
//   Phase 2, unit mostly busy: grant rate against queue depth must follow
//   (QDEPTH - depth) / QDEPTH - always at depth 0, never at a full queue.
module tb_ndp_token_scheduler;
  localparam int NH = 2, TK = 8, QD = 4, NU = 1, DW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NH-1:0] req_valid, req_ready, resp_valid, resp_grant, rel_valid, fb_valid, fb_late;
  logic [DW-1:0] req_desc [NH];
  logic [2:0] resp_slot [NH], rel_slot [NH];
  logic [TK-1:0] done_mask [NH];
  logic [3:0] budget [NH];
  logic [NU-1:0] unit_idle, unit_start, unit_done;
  logic [DW-1:0] unit_desc;
  logic [3:0] unit_tag, unit_done_tag [NU];
  initial begin unit_done = '0; unit_done_tag[0] = '0; end
  logic [2:0] depth;
  logic [31:0] n_granted, n_refused;
  ndp_token_scheduler #(.NUM_HOSTS(NH), .TOK_CAP(TK), .QDEPTH(QD), .NUM_UNITS(NU), .DESC_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 12) $display("FAIL: %s", what); end
  endtask

  // unit model: finishes a started task on the next cycle
  logic idle_en;
  int n_started = 0;
  logic [DW-1:0] last_desc;
  always @(posedge clk) begin
    unit_done <= '0;
    if (rst_n && unit_start[0]) begin
      unit_done <= 1'b1; unit_done_tag[0] <= unit_tag; n_started++; last_desc <= unit_desc;
    end
  end
  assign unit_idle = idle_en;

  // one request from host h; returns grant and slot
  task automatic request(input int h, input logic [DW-1:0] d, output bit g, output int s, output int dep);
    @(negedge clk); req_valid[h] = 1; req_desc[h] = d; dep = int'(depth);
    @(posedge clk); #1; while (!req_ready[h]) begin @(posedge clk); #1; end
    @(negedge clk); req_valid[h] = 0;
    check(resp_valid[h], "response one cycle after acceptance");
    g = resp_grant[h]; s = int'(resp_slot[h]);
  endtask
  task automatic give_back(input int h, input int s);
    @(negedge clk); rel_valid[h] = 1; rel_slot[h] = 3'(s); @(negedge clk); rel_valid[h] = 0;
  endtask
  task automatic feedback(input int h, input bit late);
    @(negedge clk); fb_valid[h] = 1; fb_late[h] = late; @(negedge clk); fb_valid[h] = 0;
  endtask

  int done_seen [NH][TK];
  always @(posedge clk) if (rst_n) for (int h = 0; h < NH; h++) for (int k = 0; k < TK; k++) if (done_mask[h][k]) done_seen[h][k]++;

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit g; int s, dep; int held[$];
    int tries [QD+1]; int grants [QD+1];
    req_valid = 0; rel_valid = 0; fb_valid = 0; fb_late = 0; idle_en = 1;
    foreach (req_desc[h]) begin req_desc[h] = 0; rel_slot[h] = 0; end
    foreach (done_seen[h, k]) done_seen[h][k] = 0;
    foreach (tries[d]) begin tries[d] = 0; grants[d] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    check(budget[0] == 4'(TK) && budget[1] == 4'(TK), "budget starts at the cap");
    // ---- phase 1: tokens ----
    for (int i = 0; i < TK; i++) begin
      request(0, DW'(8'h40 + i), g, s, dep);
      check(g && s == i, $sformatf("host 0 request %0d granted slot %0d (g=%0d)", i, s, g));
    end
    repeat (3) @(negedge clk);
    check(n_started == TK && last_desc == 8'h47, "tasks dispatched to the unit with their descriptors");
    for (int k = 0; k < TK; k++) check(done_seen[0][k] == 1 && done_seen[1][k] == 0, "done routed to host 0 slot");
    request(0, 8'h50, g, s, dep);
    check(!g, "refused without a free token");
    request(1, 8'h60, g, s, dep);
    check(g && s == 0, "other host unaffected");
    give_back(1, 0);
    give_back(0, 5);
    request(0, 8'h51, g, s, dep);
    check(g && s == 5, "released token reused");
    for (int i = 0; i < 10; i++) feedback(0, 1'b1);
    check(budget[0] == 4'd1, $sformatf("late feedback lowers budget to the floor (%0d)", budget[0]));
    for (int k = 0; k < TK; k++) give_back(0, k);
    request(0, 8'h52, g, s, dep); check(g, "budget 1: first granted");
    request(0, 8'h53, g, s, dep); check(!g, "budget 1: second refused");
    feedback(0, 1'b0);
    check(budget[0] == 4'd2, "early feedback raises budget");
    request(0, 8'h54, g, s, dep); check(g, "budget 2: second granted");
    for (int i = 0; i < 10; i++) feedback(0, 1'b0);
    check(budget[0] == 4'(TK), "budget capped at TOK_CAP");
    for (int k = 0; k < TK; k++) give_back(0, k);
    // ---- phase 2: grant probability against queue depth ----
    for (int it = 0; it < 1500; it++) begin
      @(negedge clk); idle_en = ($urandom % 4 == 0);
      request(1, DW'(it), g, s, dep);
      // the depth seen by the arbiter is the one at the acceptance edge
      tries[dep]++; if (g) begin grants[dep]++; give_back(1, s); end
    end
    idle_en = 1;
    check(tries[0] > 20 && grants[0] == tries[0], $sformatf("depth 0: %0d of %0d granted", grants[0], tries[0]));
    check(tries[QD] > 20 && grants[QD] == 0, $sformatf("full queue: %0d of %0d granted", grants[QD], tries[QD]));
    for (int d = 1; d < QD; d++) if (tries[d] > 40) begin
      real r; r = real'(grants[d]) / real'(tries[d]);
      check(r > real'(QD - d) / QD - 0.2 && r < real'(QD - d) / QD + 0.2,
            $sformatf("depth %0d: grant rate %f expected %f", d, r, real'(QD - d) / QD));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
