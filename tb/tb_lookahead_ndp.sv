// Self-checking testbench of lookahead_ndp: F = 5 feature rows of 8 signed
// elements, generated from their addresses by a formula, served by a
// pooled-memory model with random request back-pressure and a 3-cycle
// response latency.  All 10 pair dot products are recomputed here and
// compared in order; the compute phase must take exactly one cycle per
// pair when res_ready stays high.
module tb_lookahead_ndp;
  localparam int F = 5, D = 8, DW = 16, AW = 32, ACW = 40, TW = 5, NP = F * (F - 1) / 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, idle, mem_req_valid, mem_req_ready, mem_rsp_valid, res_valid, res_ready, done;
  logic [F*AW-1:0] desc;
  logic [TW-1:0] tag, res_tag, done_tag;
  logic [AW-1:0] mem_req_addr;
  logic [D*DW-1:0] mem_rsp_data;
  logic [$clog2(NP+1)-1:0] res_idx;
  logic signed [ACW-1:0] res_data;
  lookahead_ndp #(.F(F), .EMB_DIM(D), .DATA_W(DW), .ADDR_W(AW), .ACC_W(ACW), .TAG_W(TW)) dut (.*);

  function automatic int elem(input int addr, input int d);
    return ((addr * 37 + d * 11) % 2001) - 1000;
  endfunction
  function automatic logic [D*DW-1:0] row(input int addr);
    logic [D*DW-1:0] r;
    for (int d = 0; d < D; d++) r[d*DW +: DW] = DW'(elem(addr, d));
    return r;
  endfunction

  // memory model: 3-cycle latency, in order
  int lat_q[$]; int addr_q[$];
  always @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    foreach (lat_q[k]) lat_q[k]--;
    if (lat_q.size() > 0 && lat_q[0] <= 0) begin
      void'(lat_q.pop_front());
      mem_rsp_valid <= 1'b1; mem_rsp_data <= row(addr_q.pop_front());
    end
    if (mem_req_valid && mem_req_ready) begin lat_q.push_back(3); addr_q.push_back(int'(mem_req_addr)); end
  end
  always @(negedge clk) mem_req_ready = ($urandom % 2 == 0);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one_task(input int base, input int t, input bit stall);
    int addrs [F]; int n = 0; int first = -1, last = -1, cyc = 0;
    for (int f = 0; f < F; f++) begin addrs[f] = base + f * 64 + t; desc[f*AW +: AW] = AW'(addrs[f]); end
    @(negedge clk); start = 1; tag = TW'(t); @(negedge clk); start = 0;
    while (!done && cyc < 1000) begin
      res_ready = stall ? ($urandom % 2 == 0) : 1'b1;
      #1;
      if (res_valid && res_ready) begin
        int a, b; longint e;
        a = 0; b = 1;
        for (int k = 0; k < n; k++) begin b++; if (b == F) begin a++; b = a + 1; end end
        e = 0;
        for (int d = 0; d < D; d++) e += longint'(elem(addrs[a], d)) * longint'(elem(addrs[b], d));
        check(int'(res_idx) == n, "pair index order");
        check(res_tag == TW'(t), "result tag");
        check(longint'(res_data) == e, $sformatf("pair (%0d,%0d) = %0d expected %0d", a, b, res_data, e));
        if (first < 0) first = cyc;
        last = cyc; n++;
      end
      @(negedge clk); cyc++;
    end
    check(n == NP, $sformatf("%0d results expected %0d", n, NP));
    check(done_tag == TW'(t), "done tag");
    if (!stall) check(last - first == NP - 1, $sformatf("compute phase %0d cycles", last - first + 1));
    @(negedge clk); check(idle, "idle after done");
  endtask

  initial begin
    start = 0; desc = '0; tag = '0; res_ready = 1; mem_rsp_valid = 0; mem_rsp_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    one_task(1000, 3, 1'b0);
    one_task(5000, 17, 1'b1);
    one_task(123, 30, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
