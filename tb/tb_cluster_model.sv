// Self-checking testbench of cluster_model with a small table (16
// identifiers, 2 clusters seeded as blocks 0-7 and 8-15, top-2
// neighbours).  The pair counts come from an array in the testbench:
//   * id 3 co-occurs only with 12 and 13  -> must move to cluster 1
//   * id 8 co-occurs only with 0 and 1    -> must move to cluster 0
//   * id 5 has no neighbours              -> must stay in cluster 0
//   * id 14 co-occurs with 15 and 9       -> must stay in cluster 1
// Cluster sizes, the move counter, the visit time per identifier
// (1 + N + K + N cycles) and a second, stable pass are checked.
module tb_cluster_model;
  localparam int N = 16, NC = 2, K = 2, FW = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, dirty_clr, done, busy;
  logic [N-1:0] dirty;
  logic [3:0] rd_i, rd_j;
  logic [FW-1:0] rd_freq, freq_max;
  logic [0:0] part [N];
  logic [4:0] csize [NC];
  logic [15:0] n_moved;
  cluster_model #(.N_IDS(N), .K_TOP(K), .N_CLUST(NC), .FREQ_W(FW)) dut (.*);

  int fm [N][N];
  assign rd_freq = FW'(fm[rd_i][rd_j]);
  assign freq_max = 7'd9;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic pair(input int a, input int b, input int f);
    fm[a][b] = f; fm[b][a] = f;
  endtask

  task automatic run(input logic [N-1:0] d, output int cycles);
    @(negedge clk); dirty = d; start = 1; @(negedge clk); start = 0;
    check(dirty_clr == 1'b1, "dirty flags released at start");
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    start = 0; dirty = '0;
    foreach (fm[a, b]) fm[a][b] = 0;
    pair(3, 12, 9); pair(3, 13, 4);
    pair(8, 0, 6); pair(8, 1, 6);
    pair(14, 15, 5); pair(14, 9, 2);
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(part[3] == 0 && part[8] == 1 && csize[0] == 8 && csize[1] == 8, "initial block partition");
    run(16'b0100_0001_0010_1000, cyc);   // ids 3, 5, 8, 14
    check(part[3] == 1, "id 3 joins cluster 1");
    check(part[8] == 0, "id 8 joins cluster 0");
    check(part[5] == 0, "id 5 without neighbours keeps its cluster");
    check(part[14] == 1, "id 14 stays in cluster 1");
    check(csize[0] == 8 && csize[1] == 8, $sformatf("sizes %0d %0d", csize[0], csize[1]));
    check(n_moved == 2, $sformatf("moves %0d expected 2", n_moved));
    // 4 dirty ids: 3 with neighbours take 1+N+NC+N cycles, id 5 1+N+NC; plus the final pick
    check(cyc == 3 * (1 + N + NC + N) + (1 + N + NC) + 2, $sformatf("pass took %0d cycles", cyc));
    run(16'b0000_0001_0000_1000, cyc);
    check(part[3] == 1 && part[8] == 0 && n_moved == 2, "second pass is stable");
    check(!busy, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
