// locality_monitor: embedding locality monitoring on the pooled-memory device.
//
// Every host reports the embedding entries it looks up (table, identifier).
// The device-side predictor learns from the union of these streams, which
// is what lets it see cross-host associations that no single host can.  The
// monitor must never slow a host down, so it is best effort: each host has
// a one-entry pending register; a round-robin arbiter forwards one pending
// access per cycle to the co-occurrence window of its table, choosing only
// among accesses whose window is ready.  A report that arrives while the
// host's pending entry is still waiting is dropped and counted; the
// predictor then learns from a sample of the stream.
// The document names the module and its job; the best-effort sampling, the
// round-robin policy and the counters are this design's choices.
//
// Interface: in_valid is a one-cycle report per host (no back-pressure).
// out_valid is one-hot per table and only raised when that table's
// out_ready is high, so an access is taken in the cycle it is shown.
module locality_monitor #(
  parameter int unsigned NUM_HOSTS  = 8,
  parameter int unsigned NUM_TABLES = 26,
  parameter int unsigned ID_W       = 6,
  localparam int unsigned HW = (NUM_HOSTS > 1) ? $clog2(NUM_HOSTS) : 1,
  localparam int unsigned TW = (NUM_TABLES > 1) ? $clog2(NUM_TABLES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_HOSTS-1:0]  in_valid,
  input  logic [TW-1:0]         in_table [NUM_HOSTS],
  input  logic [ID_W-1:0]       in_id    [NUM_HOSTS],
  // one access per cycle, steered to the predictor of its table
  output logic [NUM_TABLES-1:0] out_valid,
  input  logic [NUM_TABLES-1:0] out_ready,
  output logic [HW-1:0]         out_host,
  output logic [TW-1:0]         out_table,
  output logic [ID_W-1:0]       out_id,
  output logic [31:0]           host_count [NUM_HOSTS],
  output logic [31:0]           drop_count
);

  logic [NUM_HOSTS-1:0] p_valid;
  logic [TW-1:0]        p_table [NUM_HOSTS];
  logic [ID_W-1:0]      p_id    [NUM_HOSTS];

  // hosts whose pending access can go now
  logic [NUM_HOSTS-1:0] can_go, grant;
  logic [HW-1:0]        sel;
  logic                 any;
  always_comb
    for (int h = 0; h < NUM_HOSTS; h++)
      can_go[h] = p_valid[h] && (int'(p_table[h]) < NUM_TABLES) && out_ready[p_table[h]];

  rr_arbiter #(.N(NUM_HOSTS)) u_arb (
    .clk, .rst_n, .req(can_go), .advance(1'b1), .grant, .grant_idx(sel), .any);

  always_comb begin
    out_valid = '0;
    if (any) out_valid[p_table[sel]] = 1'b1;
  end
  assign out_host  = sel;
  assign out_table = p_table[sel];
  assign out_id    = p_id[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= '0; drop_count <= '0;
      for (int h = 0; h < NUM_HOSTS; h++) begin
        p_table[h] <= '0; p_id[h] <= '0; host_count[h] <= '0;
      end
    end else begin
      logic [31:0] drops;
      drops = drop_count;
      for (int h = 0; h < NUM_HOSTS; h++) begin
        if (grant[h]) begin
          p_valid[h]    <= 1'b0;
          host_count[h] <= host_count[h] + 32'd1;
        end
        if (in_valid[h]) begin
          if (!p_valid[h] || grant[h]) begin
            p_valid[h] <= 1'b1; p_table[h] <= in_table[h]; p_id[h] <= in_id[h];
          end else drops = drops + 32'd1;
        end
      end
      drop_count <= drops;
    end
  end

  a_one_out: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out_valid));

endmodule
