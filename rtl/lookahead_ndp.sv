// lookahead_ndp: one near-memory processing unit computing the sparse-only
// feature interaction of one sample.
//
// DLRM's interaction layer takes the dot product of every pair of feature
// vectors.  Sage splits it: the host computes the dense and dense x sparse
// terms, while the device computes the sparse x sparse terms from the
// embedding rows that sit in pooled memory, so the host never has to pull
// those rows over CXL.  A task names the pooled-memory address of each of
// the F sparse feature rows of a sample.  The unit
//   1. LOAD    issues F row reads and stores the rows, in order of arrival,
//              in a local scratchpad (F x EMB_DIM elements);
//   2. COMPUTE produces the F(F-1)/2 dot products of pairs (a, b), a < b,
//              in row-major order, one pair per accepted res handshake
//              (EMB_DIM multipliers and an adder tree);
//   3. pulses done with the task's tag.
// Elements are signed DATA_W-bit fixed point; results are ACC_W bits.  The
// decomposition is the document's; the element format, the one-pair-per-
// cycle datapath and the load-then-compute order are this design's.
//
// Interface: start/desc/tag when idle; mem_req valid/ready with a row
// address; mem_rsp_valid with a whole row, responses in request order;
// res_valid/res_ready with (tag, pair index, value).
module lookahead_ndp #(
  parameter int unsigned F       = 26,
  parameter int unsigned EMB_DIM = 64,
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned ACC_W   = 40,
  parameter int unsigned TAG_W   = 5,
  localparam int unsigned NPAIR  = F * (F - 1) / 2,
  localparam int unsigned FW     = $clog2(F + 1),
  localparam int unsigned PW     = $clog2(NPAIR + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [F*ADDR_W-1:0]         desc,
  input  logic [TAG_W-1:0]            tag,
  output logic                        idle,
  output logic                        mem_req_valid,
  input  logic                        mem_req_ready,
  output logic [ADDR_W-1:0]           mem_req_addr,
  input  logic                        mem_rsp_valid,
  input  logic [EMB_DIM*DATA_W-1:0]   mem_rsp_data,
  output logic                        res_valid,
  input  logic                        res_ready,
  output logic [TAG_W-1:0]            res_tag,
  output logic [PW-1:0]               res_idx,
  output logic signed [ACC_W-1:0]     res_data,
  output logic                        done,
  output logic [TAG_W-1:0]            done_tag
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMPUTE} state_e;
  state_e state;

  logic [F*ADDR_W-1:0]       d_r;
  logic [EMB_DIM*DATA_W-1:0] sp [F];
  logic [FW-1:0]             n_req, n_rsp, a, b;
  logic [PW-1:0]             idx;

  assign idle          = (state == S_IDLE);
  assign mem_req_valid = (state == S_LOAD) && (int'(n_req) < F);
  assign mem_req_addr  = d_r[n_req[FW-1:0] * ADDR_W +: ADDR_W];
  assign res_valid     = (state == S_COMPUTE);
  assign res_tag       = done_tag;
  assign res_idx       = idx;

  always_comb begin
    logic signed [ACC_W-1:0] acc;
    acc = '0;
    for (int d = 0; d < EMB_DIM; d++)
      acc = acc + ACC_W'($signed(sp[a][d*DATA_W +: DATA_W]) * $signed(sp[b][d*DATA_W +: DATA_W]));
    res_data = acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; d_r <= '0; n_req <= '0; n_rsp <= '0;
      a <= '0; b <= '0; idx <= '0; done <= 1'b0; done_tag <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          d_r <= desc; done_tag <= tag; n_req <= '0; n_rsp <= '0; state <= S_LOAD;
        end
        S_LOAD: begin
          if (mem_req_valid && mem_req_ready) n_req <= n_req + 1'b1;
          if (mem_rsp_valid) begin
            n_rsp <= n_rsp + 1'b1;
            if (int'(n_rsp) == F - 1) begin
              a <= '0; b <= FW'(1); idx <= '0; state <= S_COMPUTE;
            end
          end
        end
        S_COMPUTE: if (res_ready) begin
          idx <= idx + 1'b1;
          if (int'(b) == F - 1) begin
            if (int'(a) == F - 2) begin
              done <= 1'b1; state <= S_IDLE;
            end else begin
              a <= a + 1'b1; b <= a + FW'(2);
            end
          end else b <= b + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // scratchpad: rows in arrival order
  always_ff @(posedge clk)
    if (state == S_LOAD && mem_rsp_valid) sp[n_rsp] <= mem_rsp_data;

  a_rsp_order: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_LOAD && mem_rsp_valid) |-> (n_rsp < n_req));

endmodule
