// ndp_token_scheduler: best-effort admission of look-ahead NDP tasks (the
// feature interaction scheduler of the pooled-memory device).
//
// Hosts offload the sparse-only feature interaction of cold embeddings to
// the device, but must never wait for it: a task the device will not take
// is refused at once and the host computes it locally.  Admission rules:
//   * Each host holds a small token budget (1..TOK_CAP) that bounds its
//     outstanding tasks; a token is taken on grant and returned when the
//     host has read the result (rel_*).  No token -> refused.
//   * A request is granted with probability (QDEPTH - depth) / QDEPTH,
//     depth being the current task-queue occupancy, so hosts back off
//     naturally under contention; a full queue refuses everything.
//   * Host feedback adapts the budget: a result that arrived late lowers it
//     by one, one that arrived early and was consumed raises it by one, up
//     to TOK_CAP.
// Granted tasks wait in a FIFO and are dispatched to the first idle NDP
// unit.  The rules are the document's; reading "in proportion to observed
// queue depth" as a grant probability falling linearly with depth, the
// LFSR, the FIFO and all sizes are this design's choices.
//
// Interface: per host, req_valid/req_ready with a task descriptor; one cycle
// after acceptance resp_valid with resp_grant (1 = taken, 0 = compute
// locally) and resp_slot (the token, which also names the result slot).
// done_mask pulses the slots whose results were written.  Towards the
// units: one-hot unit_start with a shared descriptor/tag bus.
module ndp_token_scheduler #(
  parameter int unsigned NUM_HOSTS = 8,
  parameter int unsigned TOK_CAP   = 4,
  parameter int unsigned QDEPTH    = 16,
  parameter int unsigned NUM_UNITS = 32,
  parameter int unsigned DESC_W    = 832,
  localparam int unsigned HW   = (NUM_HOSTS > 1) ? $clog2(NUM_HOSTS) : 1,
  localparam int unsigned KW   = (TOK_CAP > 1) ? $clog2(TOK_CAP) : 1,
  localparam int unsigned QW   = $clog2(QDEPTH),
  localparam int unsigned UW   = (NUM_UNITS > 1) ? $clog2(NUM_UNITS) : 1,
  localparam int unsigned TAG_W = HW + KW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // task requests from the hosts
  input  logic [NUM_HOSTS-1:0] req_valid,
  output logic [NUM_HOSTS-1:0] req_ready,
  input  logic [DESC_W-1:0]    req_desc [NUM_HOSTS],
  output logic [NUM_HOSTS-1:0] resp_valid,
  output logic [NUM_HOSTS-1:0] resp_grant,
  output logic [KW-1:0]        resp_slot [NUM_HOSTS],
  // completion, result consumption and lateness feedback
  output logic [TOK_CAP-1:0]   done_mask [NUM_HOSTS],
  input  logic [NUM_HOSTS-1:0] rel_valid,
  input  logic [KW-1:0]        rel_slot [NUM_HOSTS],
  input  logic [NUM_HOSTS-1:0] fb_valid,
  input  logic [NUM_HOSTS-1:0] fb_late,
  output logic [KW:0]          budget [NUM_HOSTS],
  // NDP units
  input  logic [NUM_UNITS-1:0] unit_idle,
  output logic [NUM_UNITS-1:0] unit_start,
  output logic [DESC_W-1:0]    unit_desc,
  output logic [TAG_W-1:0]     unit_tag,
  input  logic [NUM_UNITS-1:0] unit_done,
  input  logic [TAG_W-1:0]     unit_done_tag [NUM_UNITS],
  // status
  output logic [QW:0]          depth,
  output logic [31:0]          n_granted,
  output logic [31:0]          n_refused
);

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [DESC_W-1:0] desc;
  } task_t;

  task_t              q [QDEPTH];
  logic [QW-1:0]      q_rd, q_wr;
  logic [TOK_CAP-1:0] tok [NUM_HOSTS];
  logic [HW-1:0]      last;
  logic [15:0]        lfsr;

  // round-robin pick among requesting hosts
  logic          sel_ok;
  logic [HW-1:0] sel;
  always_comb begin
    sel_ok = 1'b0; sel = '0;
    for (int k = 1; k <= NUM_HOSTS; k++) begin
      int h;
      h = (int'(last) + k) % NUM_HOSTS;
      if (req_valid[h] && !sel_ok) begin sel_ok = 1'b1; sel = HW'(h); end
    end
    req_ready = '0;
    if (sel_ok) req_ready[sel] = 1'b1;
  end

  // token and queue checks for the selected host
  logic          tok_ok, grant;
  logic [KW-1:0] free_tok;
  logic [KW:0]   used;
  always_comb begin
    tok_ok = 1'b0; free_tok = '0; used = '0;
    for (int k = 0; k < TOK_CAP; k++) if (tok[sel][k]) used = used + 1'b1;
    for (int k = TOK_CAP - 1; k >= 0; k--) if (!tok[sel][k]) free_tok = KW'(k);
    tok_ok = (used < budget[sel]);
    grant  = sel_ok && tok_ok && (int'(depth) < QDEPTH) &&
             ((QW+1)'(lfsr[QW-1:0]) >= depth);
  end

  // dispatch to the first idle unit
  logic          disp_ok;
  logic [UW-1:0] disp_u;
  always_comb begin
    disp_ok = 1'b0; disp_u = '0;
    for (int u = NUM_UNITS - 1; u >= 0; u--) if (unit_idle[u]) begin disp_ok = 1'b1; disp_u = UW'(u); end
    disp_ok   = disp_ok && (depth != '0);
    unit_start = '0;
    if (disp_ok) unit_start[disp_u] = 1'b1;
  end
  assign unit_desc = q[q_rd].desc;
  assign unit_tag  = q[q_rd].tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_rd <= '0; q_wr <= '0; depth <= '0; last <= HW'(NUM_HOSTS - 1);
      lfsr <= 16'hACE1; n_granted <= '0; n_refused <= '0;
      resp_valid <= '0; resp_grant <= '0;
      for (int h = 0; h < NUM_HOSTS; h++) begin
        tok[h] <= '0; budget[h] <= (KW+1)'(TOK_CAP); resp_slot[h] <= '0; done_mask[h] <= '0;
      end
      for (int e = 0; e < QDEPTH; e++) q[e] <= '0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      resp_valid <= '0;
      resp_grant <= '0;
      for (int h = 0; h < NUM_HOSTS; h++) begin
        done_mask[h] <= '0;
        if (rel_valid[h]) tok[h][rel_slot[h]] <= 1'b0;
        if (fb_valid[h]) begin
          if (fb_late[h]) begin
            if (budget[h] > (KW+1)'(1)) budget[h] <= budget[h] - 1'b1;
          end else if (budget[h] < (KW+1)'(TOK_CAP)) budget[h] <= budget[h] + 1'b1;
        end
      end
      for (int u = 0; u < NUM_UNITS; u++)
        if (unit_done[u])
          done_mask[unit_done_tag[u][TAG_W-1 -: HW]][unit_done_tag[u][KW-1:0]] <= 1'b1;
      if (sel_ok) begin
        last            <= sel;
        resp_valid[sel] <= 1'b1;
        resp_grant[sel] <= grant;
        resp_slot[sel]  <= free_tok;
        if (grant) begin
          tok[sel][free_tok] <= 1'b1;
          q[q_wr]            <= '{tag: {sel, free_tok}, desc: req_desc[sel]};
          q_wr               <= (int'(q_wr) == QDEPTH - 1) ? '0 : q_wr + 1'b1;
          n_granted          <= n_granted + 32'd1;
        end else n_refused <= n_refused + 32'd1;
      end
      if (disp_ok) q_rd <= (int'(q_rd) == QDEPTH - 1) ? '0 : q_rd + 1'b1;
      depth <= depth + (QW+1)'(grant) - (QW+1)'(disp_ok);
    end
  end

  a_depth: assert property (@(posedge clk) disable iff (!rst_n) int'(depth) <= QDEPTH);

endmodule
