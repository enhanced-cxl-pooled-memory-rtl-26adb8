// ndp_result_buffer: per-batch result buffer of the look-ahead NDP.
//
// An offloaded task writes its reduced result - the NPAIR sparse x sparse
// dot products of one sample - into the device-side buffer, and the host
// later reads it over CXL.mem and merges it with its own dense terms.
// Results are stored by (host, token slot, pair index): each host's token
// slots own a fixed region, so a slot's results stay until the host has
// read them and returned the token.  The buffer is a single-write,
// single-read memory; reads return one cycle after rd_en.  The buffer's
// role is the document's; its organisation by token slot is this design's.
module ndp_result_buffer #(
  parameter int unsigned NUM_HOSTS = 8,
  parameter int unsigned TOK_CAP   = 4,
  parameter int unsigned NPAIR     = 325,
  parameter int unsigned ACC_W     = 40,
  localparam int unsigned HW    = (NUM_HOSTS > 1) ? $clog2(NUM_HOSTS) : 1,
  localparam int unsigned KW    = (TOK_CAP > 1) ? $clog2(TOK_CAP) : 1,
  localparam int unsigned PW    = $clog2(NPAIR + 1),
  localparam int unsigned DEPTH = NUM_HOSTS * TOK_CAP * NPAIR,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [HW-1:0]    wr_host,
  input  logic [KW-1:0]    wr_slot,
  input  logic [PW-1:0]    wr_idx,
  input  logic [ACC_W-1:0] wr_data,
  input  logic             rd_en,
  input  logic [HW-1:0]    rd_host,
  input  logic [KW-1:0]    rd_slot,
  input  logic [PW-1:0]    rd_idx,
  output logic [ACC_W-1:0] rd_data
);

  logic [ACC_W-1:0] mem [DEPTH];

  function automatic logic [AW-1:0] addr(input logic [HW-1:0] h, input logic [KW-1:0] k,
                                         input logic [PW-1:0] i);
    return AW'((int'(h) * TOK_CAP + int'(k)) * NPAIR + int'(i));
  endfunction

  always_ff @(posedge clk) begin
    if (we) mem[addr(wr_host, wr_slot, wr_idx)] <= wr_data;
    if (rd_en) rd_data <= mem[addr(rd_host, rd_slot, rd_idx)];
  end

endmodule
