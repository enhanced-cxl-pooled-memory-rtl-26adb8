// Self-checking testbench of cooc_window: random identifier streams (with
// many repeats, so that counts above 1 and expiring pairs occur) against a
// reference model that recounts freq(i,j) = n_i * n_j over the last W
// accesses.  After every access the whole pair matrix, freq_max and the
// window contents are compared; the update time per access is checked
// against the 2(W-1)+1 cycle bound.
module tb_cooc_window;
  localparam int N = 8, W = 6, IW = 3;
  localparam int FW = $clog2((W / 2) * ((W + 1) / 2) + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic acc_valid, acc_ready, dirty_clr, busy;
  logic [IW-1:0] acc_id, rda_i, rda_j, rdb_i, rdb_j;
  logic [FW-1:0] rda_freq, rdb_freq, freq_max;
  logic [IW-1:0] win_id [W];
  logic [$clog2(W):0] win_cnt;
  logic [$clog2(W)-1:0] win_head;
  logic [N-1:0] dirty;
  cooc_window #(.N_IDS(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  int q[$];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n[N]; int mx; int cyc;
    acc_valid = 0; acc_id = 0; dirty_clr = 0; rda_i = 0; rda_j = 0; rdb_i = 0; rdb_j = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (busy) @(negedge clk);
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      acc_valid = 1; acc_id = IW'((it < 150) ? ($urandom % 3) : ($urandom % N));
      @(posedge clk); @(negedge clk); acc_valid = 0;
      q.push_back(int'(acc_id)); if (q.size() > W) void'(q.pop_front());
      cyc = 1;
      while (!acc_ready) begin @(negedge clk); cyc++; end
      check(cyc <= 2 * (W - 1) + 2, $sformatf("update took %0d cycles", cyc));
      foreach (n[i]) n[i] = 0;
      foreach (q[p]) n[q[p]]++;
      mx = 0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (i != j) begin
        rda_i = IW'(i); rda_j = IW'(j); rdb_i = IW'(j); rdb_j = IW'(i); #1;
        check(int'(rda_freq) == n[i] * n[j], $sformatf("freq(%0d,%0d)=%0d expected %0d", i, j, rda_freq, n[i] * n[j]));
        check(rda_freq == rdb_freq, "symmetry");
        if (n[i] * n[j] > mx) mx = n[i] * n[j];
      end
      check(int'(freq_max) == mx, $sformatf("freq_max %0d expected %0d", freq_max, mx));
      check(int'(win_cnt) == q.size(), "window occupancy");
      check(int'(win_id[(int'(win_head) + q.size() - 1) % W]) == q[$], "newest window entry");
      if (it == 200) begin
        check(dirty != '0, "dirty flags set"); @(negedge clk); dirty_clr = 1; @(negedge clk); dirty_clr = 0;
        check(dirty == '0, "dirty flags cleared");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
