// Self-checking testbench of ndp_result_buffer: random writes to random
// (host, slot, pair) locations mixed with random reads, checked against an
// associative-array model; reads must return the data one cycle after
// rd_en, and regions of different hosts and slots must not alias.
module tb_ndp_result_buffer;
  localparam int NH = 3, TK = 2, NP = 10, ACW = 40;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, rd_en;
  logic [1:0] wr_host, rd_host;
  logic [0:0] wr_slot, rd_slot;
  logic [3:0] wr_idx, rd_idx;
  logic [ACW-1:0] wr_data, rd_data;
  ndp_result_buffer #(.NUM_HOSTS(NH), .TOK_CAP(TK), .NPAIR(NP), .ACC_W(ACW)) dut (.*);

  int checks = 0, failures = 0;
  logic [ACW-1:0] model [int];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int key; bit pend = 0; logic [ACW-1:0] expv;
    we = 0; rd_en = 0; wr_host = 0; wr_slot = 0; wr_idx = 0; wr_data = 0; rd_host = 0; rd_slot = 0; rd_idx = 0;
    // fill every location once
    for (int h = 0; h < NH; h++) for (int k = 0; k < TK; k++) for (int i = 0; i < NP; i++) begin
      @(negedge clk); we = 1; wr_host = 2'(h); wr_slot = 1'(k); wr_idx = 4'(i);
      wr_data = {8'(h), 8'(k), 8'(i), 16'($urandom)}; model[(h * TK + k) * NP + i] = wr_data;
    end
    @(negedge clk); we = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      if (pend) check(rd_data == expv, $sformatf("read %0d: %h expected %h", key, rd_data, expv));
      pend = 0;
      we = ($urandom % 2 == 0);
      wr_host = 2'($urandom % NH); wr_slot = 1'($urandom); wr_idx = 4'($urandom % NP); wr_data = {$urandom, 8'($urandom)};
      rd_en = ($urandom % 2 == 0);
      rd_host = 2'($urandom % NH); rd_slot = 1'($urandom); rd_idx = 4'($urandom % NP);
      if (rd_en) begin
        key = (int'(rd_host) * TK + int'(rd_slot)) * NP + int'(rd_idx);
        expv = model[key]; pend = 1;   // a same-cycle write lands after the read
      end
      if (we) model[(int'(wr_host) * TK + int'(wr_slot)) * NP + int'(wr_idx)] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
