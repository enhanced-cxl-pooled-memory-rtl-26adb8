// cooc_window: sliding-window co-occurrence counter of one embedding table.
//
// The device-side predictor learns from how often two identifiers i and j
// appear together among the W most recent accesses to a table:
// freq(i,j) = (occurrences of i in the window) x (occurrences of j).  The
// window is a circular buffer of W identifiers.  Each new access x first
// retires the oldest entry o when the window is full (freq(o,y) - 1 for
// every other entry y of the window) and then pairs x with every entry
// that remains (freq(x,y) + 1), one pair update per cycle, so an access
// costs at most 2(W-1)+1 cycles: the O(W) incremental update of the
// document.  Pairs with i == j are not counted.
//
// The counts sit in an N_IDS x N_IDS array addressed by (min(i,j),
// max(i,j)); only that half is used.  A histogram of the counts gives
// freq_max, the largest pair count now in the window, without a scan.
// After reset the array is cleared, one word per cycle (busy is high).
// Identifiers whose counts changed are flagged in dirty until dirty_clr,
// which the clustering model uses to revisit only those.
//
// The document updates the window at the end of every batch; this block
// applies the same increments and decrements one access at a time, which
// leaves the same counts at the batch boundary.  N_IDS (identifiers the
// predictor tracks per table) and W are not given and are this design's.
//
// Interface: acc_valid/acc_ready stream of identifiers; two combinational
// read ports rd*_i/rd*_j -> rd*_freq; win_id/win_cnt/win_head expose the
// window (the multiset U_t of recent identifiers).
module cooc_window #(
  parameter int unsigned N_IDS = 64,
  parameter int unsigned W     = 16,
  localparam int unsigned ID_W   = $clog2(N_IDS),
  localparam int unsigned WP_W   = $clog2(W),
  localparam int unsigned MAXF   = (W / 2) * ((W + 1) / 2),
  localparam int unsigned FREQ_W = $clog2(MAXF + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               acc_valid,
  output logic               acc_ready,
  input  logic [ID_W-1:0]    acc_id,
  input  logic [ID_W-1:0]    rda_i, rda_j,
  output logic [FREQ_W-1:0]  rda_freq,
  input  logic [ID_W-1:0]    rdb_i, rdb_j,
  output logic [FREQ_W-1:0]  rdb_freq,
  output logic [FREQ_W-1:0]  freq_max,
  output logic [ID_W-1:0]    win_id [W],
  output logic [WP_W:0]      win_cnt,
  output logic [WP_W-1:0]    win_head,
  output logic [N_IDS-1:0]   dirty,
  input  logic               dirty_clr,
  output logic               busy
);

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_EXPIRE, S_INSERT} state_e;
  state_e state;

  logic [FREQ_W-1:0]    mem  [N_IDS*N_IDS];
  logic [2*ID_W:0]      hist [MAXF+1];   // number of pairs with each count
  logic [ID_W-1:0]      wbuf [W];
  logic [WP_W-1:0]      head;
  logic [WP_W:0]        cnt;
  logic [ID_W-1:0]      x, o;
  logic [WP_W:0]        k;
  logic [2*ID_W-1:0]    init_addr;

  function automatic logic [2*ID_W-1:0] pair_addr(input logic [ID_W-1:0] a,
                                                  input logic [ID_W-1:0] b);
    return (a < b) ? {a, b} : {b, a};
  endfunction

  function automatic logic [WP_W-1:0] wrap(input logic [WP_W:0] v);
    return (int'(v) >= W) ? WP_W'(int'(v) - W) : WP_W'(v);
  endfunction

  assign rda_freq  = mem[pair_addr(rda_i, rda_j)];
  assign rdb_freq  = mem[pair_addr(rdb_i, rdb_j)];
  assign acc_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);
  assign win_id    = wbuf;
  assign win_cnt   = cnt;
  assign win_head  = head;

  always_comb begin
    freq_max = '0;
    for (int v = 1; v <= MAXF; v++) if (hist[v] != '0) freq_max = FREQ_W'(v);
  end

  // the pair visited this cycle
  logic [ID_W-1:0]   a_id, y;
  logic [2*ID_W-1:0] addr;
  logic [FREQ_W-1:0] cur;
  logic              upd, inc;
  always_comb begin
    a_id = (state == S_EXPIRE) ? o : x;
    y    = wbuf[wrap({1'b0, head} + k)];
    addr = pair_addr(a_id, y);
    cur  = mem[addr];
    inc  = (state == S_INSERT);
    upd  = ((state == S_EXPIRE) || (state == S_INSERT && k < cnt)) && (y != a_id);
  end

  always_ff @(posedge clk) begin
    if (state == S_INIT) mem[init_addr] <= '0;
    else if (upd) mem[addr] <= inc ? cur + FREQ_W'(1) : cur - FREQ_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT; init_addr <= '0; head <= '0; cnt <= '0;
      x <= '0; o <= '0; k <= '0; dirty <= '0;
      for (int v = 0; v <= MAXF; v++) hist[v] <= '0;
      for (int p = 0; p < W; p++) wbuf[p] <= '0;
    end else begin
      if (dirty_clr) dirty <= '0;
      if (upd) begin
        dirty[a_id] <= 1'b1;
        dirty[y]    <= 1'b1;
        if (inc) begin
          if (cur != '0) hist[cur] <= hist[cur] - 1'b1;
          hist[cur + FREQ_W'(1)] <= hist[cur + FREQ_W'(1)] + 1'b1;
        end else begin
          hist[cur] <= hist[cur] - 1'b1;
          if (cur != FREQ_W'(1)) hist[cur - FREQ_W'(1)] <= hist[cur - FREQ_W'(1)] + 1'b1;
        end
      end
      unique case (state)
        S_INIT: begin
          init_addr <= init_addr + 1'b1;
          if (init_addr == '1) state <= S_IDLE;
        end
        S_IDLE: if (acc_valid) begin
          x <= acc_id;
          if (int'(cnt) == W) begin
            o <= wbuf[head]; k <= (WP_W+1)'(1); state <= S_EXPIRE;
          end else begin
            k <= '0; state <= S_INSERT;
          end
        end
        S_EXPIRE: begin
          // pairs of the oldest entry with the W-1 younger ones
          if (int'(k) == W - 1) begin
            head <= wrap({1'b0, head} + 1'b1);
            cnt  <= cnt - 1'b1;
            k    <= '0;
            state <= S_INSERT;
          end else k <= k + 1'b1;
        end
        S_INSERT: begin
          if (k >= cnt) begin
            wbuf[wrap({1'b0, head} + cnt)] <= x;
            cnt   <= cnt + 1'b1;
            state <= S_IDLE;
          end else k <= k + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (upd && inc) |-> (int'(cur) < MAXF));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (upd && !inc) |-> (cur != '0));

endmodule
