// sage_pkg: types, sizes and fixed-point helpers shared by the Sage blocks.
//
// Sage manages an embedding-table cache in host DRAM (the host-reserved
// buffer, HRB) at the granularity of clusters of identifiers that a
// device-side model learns from co-occurrence.  This package holds the
// request/result encodings of the HRB group cache and the fixed-point
// arithmetic of the model:
//   * log2_fx()   - Mitchell's approximation of log2 (integer part from the
//                   leading one, fraction from the bits below it), LOG_F
//                   fraction bits.
//   * affinity()  - the log-normalised affinity
//                     A(i,j) = ln(1+f) / (ln(1+fmax) + 1)
//                   returned as an unsigned fraction with AFF_W bits.  The
//                   formula is the document's; computing it with log2 and a
//                   ln(2) constant, and its precision, are this design's.
//   * pow_alpha() - |M|^alpha, alpha a fraction with ALPHA_F bits, through
//                   2^(alpha*log2|M|) with the same linear approximations.
// All functions are combinational and synthesizable.
package sage_pkg;

  localparam int AFF_W   = 8;   // affinity fraction bits, A in [0, 1)
  localparam int LOG_F   = 8;   // fraction bits of log2_fx results
  localparam int ALPHA_F = 4;   // fraction bits of the size penalty alpha
  localparam int BYTES_W = 32;  // byte counts and capacities
  localparam int SCORE_W = 24;  // cluster score s(g), fixed point
  localparam int SCORE_F = 8;   // fraction bits of s(g)

  // ln(2) as an unsigned fraction with 16 bits
  localparam logic [15:0] LN2_Q16 = 16'd45426;

  // Group-cache request kinds: demand lookups of batch t, prefetch stages
  typedef enum logic {
    OP_DEMAND   = 1'b0,
    OP_PREFETCH = 1'b1
  } hrb_op_e;

  // Outcome of one group-cache request
  typedef enum logic [1:0] {
    RES_HIT    = 2'd0,  // cluster resident, served from the HRB
    RES_ADMIT  = 2'd1,  // cluster admitted as a whole (after evictions)
    RES_BYPASS = 2'd2,  // cannot fit: served from pooled memory, no admission
    RES_SKIP   = 2'd3   // prefetch of a cluster already resident or pinned
  } hrb_res_e;

  // log2(x) for x >= 1, 16-bit unsigned input, result 5.LOG_F fixed point.
  // log2(0) is returned as 0.
  function automatic logic [4+LOG_F:0] log2_fx(input logic [15:0] x);
    logic [3:0]  p;
    logic [31:0] frac;
    p = '0;
    for (int b = 0; b < 16; b++) if (x[b]) p = 4'(b);
    frac = (32'(x) << LOG_F) >> p;        // 1.f scaled by 2^LOG_F
    return {1'b0, p, frac[LOG_F-1:0]};
  endfunction

  // A(i,j) = ln(1+f) / (ln(1+fmax) + 1), as an AFF_W-bit fraction.
  function automatic logic [AFF_W-1:0] affinity(input logic [15:0] f,
                                                input logic [15:0] fmax);
    logic [4+LOG_F:0] lf, lm;
    logic [63:0]      num, den, q;
    lf  = log2_fx(16'(f + 16'd1));
    lm  = log2_fx(16'(fmax + 16'd1));
    num = 64'(lf) * 64'(LN2_Q16);                       // LOG_F+16 frac bits
    den = 64'(lm) * 64'(LN2_Q16) + (64'd1 << (LOG_F + 16));
    q   = (num << AFF_W) / den;
    if (q > 64'((1 << AFF_W) - 1)) q = 64'((1 << AFF_W) - 1);
    return q[AFF_W-1:0];
  endfunction

  // m^alpha for m >= 1, alpha = a / 2^ALPHA_F, result 16.LOG_F fixed point.
  function automatic logic [15+LOG_F:0] pow_alpha(input logic [15:0] m,
                                                  input logic [ALPHA_F:0] a);
    logic [4+LOG_F:0]         lm;
    logic [4+LOG_F+ALPHA_F+1:0] e;     // alpha * log2(m), LOG_F+ALPHA_F frac bits
    logic [4:0]               ip;
    logic [LOG_F-1:0]         fp;
    logic [31:0]              r;
    lm = log2_fx(m);
    e  = ($bits(e))'(lm) * ($bits(e))'(a);
    ip = e[LOG_F+ALPHA_F +: 5];
    fp = e[ALPHA_F +: LOG_F];
    r  = ((32'd1 << LOG_F) + 32'(fp)) << ip;   // 2^ip * (1 + fp)
    return r[15+LOG_F:0];
  endfunction

endpackage
