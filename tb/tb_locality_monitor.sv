// Self-checking testbench of locality_monitor: three hosts report random
// (table, id) accesses while the four table windows are randomly busy.
// Checks: every forwarded access is the oldest not-yet-seen report of its
// host that was not dropped (order kept, nothing duplicated or invented),
// it appears only on a lane that was ready, forwarded + dropped = reported
// for every host, counters agree, and with a single host and all windows
// ready nothing is dropped.
module tb_locality_monitor;
  localparam int NH = 3, NT = 4, IW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NH-1:0] in_valid;
  logic [1:0] in_table [NH];
  logic [IW-1:0] in_id [NH];
  logic [NT-1:0] out_valid, out_ready;
  logic [1:0] out_host, out_table;
  logic [IW-1:0] out_id;
  logic [31:0] host_count [NH];
  logic [31:0] drop_count;
  locality_monitor #(.NUM_HOSTS(NH), .NUM_TABLES(NT), .ID_W(IW)) dut (.*);

  int checks = 0, failures = 0;
  int sent_q [NH][$];
  int sent [NH], got [NH];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int skipped = 0;
  // scoreboard: an output must match a report of that host in order,
  // skipping the ones the monitor dropped
  always @(posedge clk) if (rst_n) begin
    if (|out_valid) begin
      bit found; found = 0;
      check($onehot(out_valid) && out_valid[out_table] && out_ready[out_table], "one-hot lane that is ready");
      while (sent_q[out_host].size() > 0 && !found) begin
        int e; e = sent_q[out_host].pop_front();
        if (e == {out_table, out_id}) found = 1; else skipped++;
      end
      check(found, $sformatf("host %0d forwarded %0h it never reported", out_host, {out_table, out_id}));
      got[out_host]++;
    end
    for (int h = 0; h < NH; h++) if (in_valid[h]) begin
      sent_q[h].push_back({in_table[h], in_id[h]}); sent[h]++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int tot;
    in_valid = '0; out_ready = '0;
    for (int h = 0; h < NH; h++) begin in_table[h] = 0; in_id[h] = 0; sent[h] = 0; got[h] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    // single host, every window ready: one report per cycle, nothing dropped
    for (int c = 0; c < 100; c++) begin
      @(negedge clk); out_ready = '1; in_valid = 3'b001; in_table[0] = 2'($urandom); in_id[0] = IW'($urandom);
    end
    @(negedge clk); in_valid = '0; repeat (3) @(negedge clk);
    check(drop_count == 0 && got[0] == 100, $sformatf("uncontended: %0d forwarded, %0d dropped", got[0], drop_count));
    // three hosts, busy windows
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      out_ready = NT'($urandom) | NT'($urandom);
      for (int h = 0; h < NH; h++) begin
        in_valid[h] = ($urandom % 3 == 0); in_table[h] = 2'($urandom); in_id[h] = IW'($urandom);
      end
    end
    @(negedge clk); in_valid = '0; out_ready = '1; repeat (5) @(negedge clk);
    tot = 0;
    for (int h = 0; h < NH; h++) begin
      check(host_count[h] == got[h], "host counter");
      tot += sent[h] - got[h];
    end
    check(drop_count == tot, $sformatf("drops %0d expected %0d", drop_count, tot));
    check(drop_count > 0, "contention drops reports");
    for (int h = 0; h < NH; h++) skipped += sent_q[h].size();
    check(skipped == drop_count, $sformatf("%0d reports skipped by the scoreboard, %0d dropped", skipped, drop_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
