// hrb_group_cache: cluster-granular directory of one host's host-reserved
// buffer (HRB).
//
// The HRB caches embedding rows in host DRAM, but every decision is taken
// for whole clusters: a cluster is resident with all its members or not at
// all.  This block keeps the directory: which clusters are resident, their
// size in bytes, one shared recency order (group LRU), and a pin bit for
// clusters touched by the current batch.  The data movement itself (copying
// the rows from pooled memory into host DRAM) is done by the host; the
// directory reports each admission and eviction so it can.
//
// Behaviour (following the document):
//   * demand request, cluster resident  -> RES_HIT, recency updated, pinned
//   * demand request, not resident      -> whole cluster admitted (RES_ADMIT)
//     after evicting unpinned clusters of the same table region from the LRU
//     tail until it fits; pinned on admission
//   * it cannot fit even with every unpinned cluster gone -> RES_BYPASS: the
//     access is served from pooled memory and nothing is evicted
//   * prefetch request, already resident (pinned or not) -> RES_SKIP
//   * prefetch request, not resident -> admitted like a demand miss but not
//     pinned; RES_BYPASS if it cannot fit
//   * batch_end clears every pin.
// Demand and prefetch share one recency order.  Capacity is kept per table
// region (cardinality-aware allocation): each table has its own byte budget,
// programmable through cfg_*, reset to an even share of HRB_BYTES.  Making
// the capacity check before any eviction (rather than evicting and then
// giving up) and the slot count SLOTS are this design's choices.
//
// Interface: two valid/ready request channels, demand with priority over
// prefetch; one request in flight.  resp_* is a one-cycle pulse: 2 cycles
// after acceptance for a hit or skip, plus one cycle per eviction and one
// for the admission on a miss.  evict_* pulses once per evicted cluster.
module hrb_group_cache
  import sage_pkg::*;
#(
  parameter int unsigned       NUM_TABLES = 26,
  parameter int unsigned       CLUSTER_W  = 3,
  parameter int unsigned       SLOTS      = 64,
  parameter longint unsigned   HRB_BYTES  = 64'd1073741824,
  localparam int unsigned      TW         = (NUM_TABLES > 1) ? $clog2(NUM_TABLES) : 1,
  localparam int unsigned      SW         = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // demand lookups of the current batch
  input  logic                 dem_valid,
  output logic                 dem_ready,
  input  logic [TW-1:0]        dem_table,
  input  logic [CLUSTER_W-1:0] dem_cluster,
  input  logic [BYTES_W-1:0]   dem_bytes,
  // prefetch stages from the contextual prefetcher
  input  logic                 pf_valid,
  output logic                 pf_ready,
  input  logic [TW-1:0]        pf_table,
  input  logic [CLUSTER_W-1:0] pf_cluster,
  input  logic [BYTES_W-1:0]   pf_bytes,
  // result of each request
  output logic                 resp_valid,
  output hrb_op_e              resp_op,
  output hrb_res_e             resp_result,
  output logic [TW-1:0]        resp_table,
  output logic [CLUSTER_W-1:0] resp_cluster,
  // evictions, one pulse per cluster
  output logic                 evict_valid,
  output logic [TW-1:0]        evict_table,
  output logic [CLUSTER_W-1:0] evict_cluster,
  output logic [BYTES_W-1:0]   evict_bytes,
  // end of the current batch: unpin everything
  input  logic                 batch_end,
  // per-table capacity (cardinality-aware allocation)
  input  logic                 cfg_we,
  input  logic [TW-1:0]        cfg_table,
  input  logic [BYTES_W-1:0]   cfg_cap,
  output logic [BYTES_W-1:0]   used_bytes [NUM_TABLES],
  output logic                 busy
);

  localparam logic [BYTES_W-1:0] CAP_RESET = BYTES_W'(HRB_BYTES / NUM_TABLES);

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_EVICT, S_ADMIT} state_e;

  typedef struct packed {
    logic                 valid;
    logic                 pinned;
    logic [TW-1:0]        table_id;
    logic [CLUSTER_W-1:0] cluster;
    logic [BYTES_W-1:0]   bytes;
    logic [31:0]          stamp;
  } slot_t;

  state_e               state;
  slot_t                slot [SLOTS];
  logic [BYTES_W-1:0]   cap        [NUM_TABLES];
  logic [BYTES_W-1:0]   used       [NUM_TABLES];
  logic [BYTES_W-1:0]   pinned_b   [NUM_TABLES];
  logic [31:0]          now;

  // request being served
  hrb_op_e              r_op;
  logic [TW-1:0]        r_table;
  logic [CLUSTER_W-1:0] r_cluster;
  logic [BYTES_W-1:0]   r_bytes;

  // ---------------- combinational search over the slots ----------------
  logic          hit, have_free, have_victim;
  logic [SW-1:0] hit_idx, free_idx, victim_idx;
  logic [31:0]   victim_stamp;

  always_comb begin
    hit = 1'b0;  hit_idx = '0;
    have_free = 1'b0; free_idx = '0;
    have_victim = 1'b0; victim_idx = '0; victim_stamp = '1;
    for (int s = 0; s < SLOTS; s++) begin
      if (slot[s].valid && slot[s].table_id == r_table &&
          slot[s].cluster == r_cluster && !hit) begin
        hit = 1'b1; hit_idx = SW'(s);
      end
      if (!slot[s].valid && !have_free) begin
        have_free = 1'b1; free_idx = SW'(s);
      end
      if (slot[s].valid && !slot[s].pinned && slot[s].table_id == r_table &&
          (!have_victim || slot[s].stamp < victim_stamp)) begin
        have_victim = 1'b1; victim_idx = SW'(s); victim_stamp = slot[s].stamp;
      end
    end
  end

  // can the cluster fit once every unpinned cluster of its table is gone?
  logic          can_fit, fits_now;
  always_comb begin
    can_fit  = ({1'b0, r_bytes} + {1'b0, pinned_b[r_table]} <= {1'b0, cap[r_table]}) &&
               (have_free || have_victim);
    fits_now = ({1'b0, r_bytes} + {1'b0, used[r_table]} <= {1'b0, cap[r_table]}) && have_free;
  end

  assign dem_ready = (state == S_IDLE);
  assign pf_ready  = (state == S_IDLE) && !dem_valid;
  assign busy      = (state != S_IDLE);
  assign used_bytes = used;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      now         <= '0;
      r_op        <= OP_DEMAND;
      r_table     <= '0;
      r_cluster   <= '0;
      r_bytes     <= '0;
      resp_valid  <= 1'b0;
      resp_op     <= OP_DEMAND;
      resp_result <= RES_HIT;
      resp_table  <= '0;
      resp_cluster<= '0;
      evict_valid <= 1'b0;
      evict_table <= '0;
      evict_cluster <= '0;
      evict_bytes <= '0;
      for (int s = 0; s < SLOTS; s++) slot[s] <= '0;
      for (int t = 0; t < NUM_TABLES; t++) begin
        cap[t]      <= CAP_RESET;
        used[t]     <= '0;
        pinned_b[t] <= '0;
      end
    end else begin
      resp_valid  <= 1'b0;
      evict_valid <= 1'b0;
      if (cfg_we) cap[cfg_table] <= cfg_cap;

      unique case (state)
        S_IDLE: begin
          if (dem_valid) begin
            r_op <= OP_DEMAND; r_table <= dem_table;
            r_cluster <= dem_cluster; r_bytes <= dem_bytes;
            state <= S_LOOKUP;
          end else if (pf_valid) begin
            r_op <= OP_PREFETCH; r_table <= pf_table;
            r_cluster <= pf_cluster; r_bytes <= pf_bytes;
            state <= S_LOOKUP;
          end
        end

        S_LOOKUP: begin
          resp_op      <= r_op;
          resp_table   <= r_table;
          resp_cluster <= r_cluster;
          if (hit) begin
            resp_valid <= 1'b1;
            state      <= S_IDLE;
            if (r_op == OP_DEMAND) begin
              resp_result           <= RES_HIT;
              slot[hit_idx].stamp   <= now;
              now                   <= now + 32'd1;
              if (!slot[hit_idx].pinned) begin
                slot[hit_idx].pinned <= 1'b1;
                pinned_b[r_table]    <= pinned_b[r_table] + slot[hit_idx].bytes;
              end
            end else begin
              resp_result <= RES_SKIP;
            end
          end else if (!can_fit) begin
            resp_valid  <= 1'b1;
            resp_result <= RES_BYPASS;
            state       <= S_IDLE;
          end else begin
            state <= fits_now ? S_ADMIT : S_EVICT;
          end
        end

        S_EVICT: begin
          // remove the LRU-tail unpinned cluster of this table region
          slot[victim_idx].valid <= 1'b0;
          used[r_table]   <= used[r_table] - slot[victim_idx].bytes;
          evict_valid     <= 1'b1;
          evict_table     <= r_table;
          evict_cluster   <= slot[victim_idx].cluster;
          evict_bytes     <= slot[victim_idx].bytes;
          state           <= S_LOOKUP;   // re-check the fit
        end

        S_ADMIT: begin
          slot[free_idx].valid    <= 1'b1;
          slot[free_idx].pinned   <= (r_op == OP_DEMAND);
          slot[free_idx].table_id <= r_table;
          slot[free_idx].cluster  <= r_cluster;
          slot[free_idx].bytes    <= r_bytes;
          slot[free_idx].stamp    <= now;
          now                     <= now + 32'd1;
          used[r_table]           <= used[r_table] + r_bytes;
          if (r_op == OP_DEMAND) pinned_b[r_table] <= pinned_b[r_table] + r_bytes;
          resp_valid  <= 1'b1;
          resp_result <= RES_ADMIT;
          state       <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase

      // pins last for one batch
      if (batch_end) begin
        for (int s = 0; s < SLOTS; s++) slot[s].pinned <= 1'b0;
        for (int t = 0; t < NUM_TABLES; t++) pinned_b[t] <= '0;
      end
    end
  end

  // the resident bytes of a region never exceed its capacity after admission
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_ADMIT) |-> ({1'b0, used[r_table]} + {1'b0, r_bytes} <= {1'b0, cap[r_table]}));

endmodule
