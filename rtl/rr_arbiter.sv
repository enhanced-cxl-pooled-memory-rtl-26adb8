// rr_arbiter: round-robin arbiter.  grant is one-hot (combinational) on the
// first requester after the one served last; the pointer moves when
// `advance` is high, i.e. when the granted request was actually taken.
module rr_arbiter #(
  parameter int unsigned N = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          advance,
  output logic [N-1:0]  grant,
  output logic [IW-1:0] grant_idx,
  output logic          any
);
  logic [IW-1:0] last;
  always_comb begin
    any = 1'b0; grant_idx = '0; grant = '0;
    for (int k = 1; k <= N; k++) begin
      int unsigned i;
      i = (int'(last) + k) % N;
      if (req[i] && !any) begin any = 1'b1; grant_idx = IW'(i); end
    end
    if (any) grant[grant_idx] = 1'b1;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) last <= IW'(N - 1);
    else if (any && advance) last <= grant_idx;
endmodule
