// Self-checking testbench of cluster_ranker: 8 identifiers in 4 clusters of
// sizes 1, 2, 4 and 1, alpha = 1, a window U_t = {0, 3, 3, 7} and a few pair
// counts.  The expected scores are computed here in floating point from the
// formula (natural logs), and the emitted list is checked for order, score
// (within the fixed-point approximation), bytes and the budget stop.
module tb_cluster_ranker;
  import sage_pkg::*;
  localparam int N = 8, W = 4, NC = 4, FW = 5, EB = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, cand_valid, cand_ready, done, busy;
  logic [31:0] budget, cand_bytes;
  logic [2:0] win_id [W];
  logic [2:0] win_cnt;
  logic [1:0] win_head;
  logic [1:0] part [N];
  logic [3:0] csize [NC];
  logic [2:0] rd_i, rd_j;
  logic [FW-1:0] rd_freq, freq_max;
  logic [1:0] cand_cluster;
  logic [SCORE_W-1:0] cand_score;
  cluster_ranker #(.N_IDS(N), .W(W), .N_CLUST(NC), .FREQ_W(FW), .ALPHA(5'd16), .ENTRY_BYTES(EB)) dut (.*);

  int fm [N][N];
  assign rd_freq = FW'(fm[rd_i][rd_j]);
  assign freq_max = 5'd8;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic pair(input int a, input int b, input int f);
    fm[a][b] = f; fm[b][a] = f;
  endtask
  function automatic real aff(input int i, input int j);
    if (i == j) return 1.0;
    return $ln(1.0 + fm[i][j]) / ($ln(1.0 + 8) + 1.0);
  endfunction

  real exp_s [NC];
  int  ui [4] = '{0, 3, 3, 7};

  task automatic run(input int b, input int exp_n, input int exp_order [4]);
    int n = 0, cyc = 0, last_bytes = 0, first = -1;
    @(negedge clk); budget = b; start = 1; @(negedge clk); start = 0;
    while (!done && cyc < 500) begin
      if (cand_valid && first < 0) first = cyc;
      if (cand_valid && cand_ready) begin
        real got;
        got = real'(cand_score) / 256.0;
        if (n < 4) check(int'(cand_cluster) == exp_order[n], $sformatf("candidate %0d is cluster %0d expected %0d", n, cand_cluster, exp_order[n]));
        check(got > exp_s[cand_cluster] * 0.88 && got < exp_s[cand_cluster] * 1.12,
              $sformatf("s(%0d) = %f expected %f", cand_cluster, got, exp_s[cand_cluster]));
        check(int'(cand_bytes) == EB * int'(csize[cand_cluster]), "candidate bytes");
        last_bytes += int'(cand_bytes);
        n++;
      end
      @(negedge clk); cyc++;
      cand_ready = ($urandom % 3 != 0);
    end
    // scoring takes |U_t| x N cycles, the division N_CLUST cycles
    check(first == W * N + NC, $sformatf("first candidate after %0d cycles", first));
    check(n == exp_n, $sformatf("%0d candidates expected %0d", n, exp_n));
    check(last_bytes <= b, "budget respected");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sizes [NC] = '{1, 2, 4, 1};
    start = 0; budget = 0; cand_ready = 1;
    foreach (fm[a, b]) fm[a][b] = 0;
    pair(0, 1, 8); pair(3, 4, 4); pair(3, 5, 1); pair(7, 6, 2);
    part = '{2'd0, 2'd1, 2'd1, 2'd2, 2'd2, 2'd2, 2'd2, 2'd3};
    foreach (csize[g]) csize[g] = 4'(sizes[g]);
    win_id = '{3'd0, 3'd3, 3'd3, 3'd7}; win_cnt = 3'd4; win_head = 2'd0;
    // reference scores, alpha = 1
    foreach (exp_s[g]) begin
      exp_s[g] = 0.0;
      foreach (ui[k]) begin
        real m; m = 0.0;
        for (int j = 0; j < N; j++) if (int'(part[j]) == g && aff(ui[k], j) > m) m = aff(ui[k], j);
        exp_s[g] += m;
      end
      exp_s[g] = exp_s[g] / sizes[g];
    end
    repeat (3) @(posedge clk); rst_n = 1;
    run(650, 3, '{0, 3, 2, 1});   // 100 + 100 + 400; cluster 1 (200) would pass 650
    run(150, 1, '{0, 3, 2, 1});   // only the first fits
    run(5000, 4, '{0, 3, 2, 1});  // the whole list
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
