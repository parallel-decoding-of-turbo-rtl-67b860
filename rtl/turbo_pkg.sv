// turbo_pkg: constants, types and arithmetic shared by the multi-point
// terminated turbo encoder and the parallel turbo decoder.
//
// Code: rate-1/3 parallel concatenation of two 8-state recursive systematic
// convolutional (RSC) encoders with generator polynomials (13,15) octal, as in
// UMTS. Both encoders are driven back to the all-zero state at Q points of an
// N-bit frame (every K = N/Q bits), so the frame splits into Q sub-blocks that
// can be decoded independently. The defaults (N = 1000, Q = 5, 6 iterations)
// are the frame length, the 5-point termination and the iteration count of
// the evaluated configuration.
//
// Soft values are two's-complement log-likelihood ratios with FRAC_BITS
// fractional bits (one LSB = 0.25 in natural-log units). A positive LLR means
// bit 1 is more likely. The widths and the fixed-point scale are this design's
// choice.
package turbo_pkg;

  // ---- code and frame geometry -------------------------------------------
  localparam int unsigned N_DEF     = 1000; // interleaver / frame length
  localparam int unsigned Q_DEF     = 5;    // number of termination points
  localparam int unsigned K_DEF     = N_DEF / Q_DEF; // sub-block length
  localparam int unsigned ITER_DEF  = 6;    // full decoding iterations
  localparam int unsigned MEM       = 3;    // RSC memory (8 states)
  localparam int unsigned NSTATE    = 8;
  localparam int unsigned TAIL      = MEM;  // tail steps per encoder

  // Quadratic permutation polynomial inside a sub-block, g(t) = f1*t + f2*t^2
  // mod K. (13, 50) is a valid pair for K = 200.
  localparam int unsigned QPP_F1_DEF = 13;
  localparam int unsigned QPP_F2_DEF = 50;

  // ---- fixed point ----------------------------------------------------------
  localparam int unsigned FRAC_BITS = 2;  // LSB = 0.25
  localparam int unsigned CH_W      = 6;  // channel LLR width
  localparam int unsigned EXT_W     = 8;  // extrinsic LLR width
  localparam int unsigned SM_W      = 12; // state metric width
  localparam int unsigned LLR_W     = 14; // a-posteriori LLR width

  typedef logic signed [CH_W-1:0]  ch_llr_t;
  typedef logic signed [EXT_W-1:0] ext_llr_t;
  typedef logic signed [SM_W-1:0]  sm_t;
  typedef logic signed [LLR_W-1:0] llr_t;

  localparam sm_t SM_NEG_INF = sm_t'(-(1 << (SM_W - 1)) + 1);

  // ---- encoded symbols --------------------------------------------------------
  // The encoded frame is a sequence of symbols. A data symbol carries
  // (X_k, P1_k, P2_k); a tail symbol carries one tail pair (t_i, z_i) in the
  // first two fields. Per sub-block: K data symbols, then 3 tail symbols of
  // encoder 1 (T_j) and 3 of encoder 2 (T'_j).
  typedef enum logic [1:0] {
    SYM_DATA  = 2'd0,
    SYM_TAIL1 = 2'd1,
    SYM_TAIL2 = 2'd2
  } sym_kind_e;

  typedef struct packed {
    sym_kind_e  kind;
    logic [2:0] bits;   // data: {P2, P1, X}; tail: {0, z, t}
  } enc_sym_t;

  typedef struct packed {
    ch_llr_t s0;        // data: systematic X; tail: t
    ch_llr_t s1;        // data: parity P1;    tail: z
    ch_llr_t s2;        // data: parity P2;    tail: unused
  } soft_sym_t;

  // Per-step inputs of a SISO decoder.
  typedef struct packed {
    ch_llr_t  ls;       // systematic channel LLR
    ch_llr_t  lp;       // parity channel LLR
    ext_llr_t la;       // a-priori LLR (extrinsic of the other decoder)
  } siso_in_t;

  // ---- RSC (13,15) trellis ---------------------------------------------------
  // State {s1,s2,s3}, s1 the most recent. Feedback a = u ^ s2 ^ s3 (13 oct =
  // 1+D^2+D^3), parity p = a ^ s1 ^ s3 (15 oct = 1+D+D^3), next = {a,s1,s2}.
  function automatic logic [2:0] rsc_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  function automatic logic rsc_parity(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // Input that drives the feedback to zero (used for the tail bits).
  function automatic logic rsc_tail_bit(input logic [2:0] s);
    return s[1] ^ s[0];
  endfunction

  // ---- Log-MAP max* ------------------------------------------------------------
  // max*(a,b) = max(a,b) + ln(1 + e^-|a-b|), correction rounded to the
  // FRAC_BITS grid: round(4*ln(1+exp(-d/4))) = 3 (d=0), 2 (d=1..3),
  // 1 (d=4..8), 0 (d>=9).
  function automatic logic [1:0] maxstar_corr(input int unsigned d);
    if (d == 0)      return 2'd3;
    else if (d <= 3) return 2'd2;
    else if (d <= 8) return 2'd1;
    else             return 2'd0;
  endfunction

  function automatic int maxstar(input int a, input int b);
    int m;
    int unsigned d;
    m = (a > b) ? a : b;
    d = (a > b) ? int'(a - b) : int'(b - a);
    return m + int'(maxstar_corr(d));
  endfunction

  function automatic int sat(input int v, input int w);
    int hi;
    int lo;
    hi = (1 << (w - 1)) - 1;
    lo = -(1 << (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
