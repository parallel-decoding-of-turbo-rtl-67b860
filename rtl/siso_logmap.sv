// siso_logmap: Log-MAP soft-in soft-out decoder for one terminated
// sub-block of the (13,15) RSC code.
//
// The sub-block is L = K + 3 trellis steps long (K data steps and 3 tail
// steps) and starts and ends in the all-zero state, so it can be decoded on
// its own: this is what multi-point trellis termination buys.
//
// Operation, one trellis step per cycle:
//   init  : alpha := (0, -inf, ...), beta := (0, -inf, ...)
//   fwd   : steps t = 0 .. L-1 with the inputs of step t on `din`. The
//           forward metrics alpha_t are stored, alpha_{t+1} computed.
//   bwd   : steps t = L-1 .. 0 with the inputs of step t on `din` again.
//           From alpha_t (stored), the branch metrics and beta_{t+1}
//           (register) the a-posteriori LLR of step t is put out
//           combinationally on `llr`, the extrinsic value
//           Le = LLR - Ls - La on `le`, the decision on `hard`; beta_t is
//           computed for the next step.
// A sub-block thus takes 2L cycles per half-iteration. The caller supplies
// the step index t on `step` in both phases and forces La = 0 on tail steps.
//
// Arithmetic: branch metric gamma(u,p) = u*(Ls + La) + p*Lp (bit values 0/1,
// equivalent to the usual +-1 form up to a per-step constant that cancels).
// Sums over paths use max*(a,b) = max(a,b) + ln(1 + e^-|a-b|) with a small
// correction table (turbo_pkg::maxstar). State metrics are renormalised every
// step by subtracting their maximum and saturated at the bottom of SM_W bits.
// The recursions follow the document's equations (2)-(4) in the log domain;
// the widths, the normalisation and the forward-then-backward schedule are
// this design's choices.
module siso_logmap
  import turbo_pkg::*;
#(
  parameter int unsigned K = K_DEF,
  localparam int unsigned L  = K + TAIL,
  localparam int unsigned SW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          fwd,
  input  logic          bwd,
  input  logic [SW-1:0] step,
  input  siso_in_t      din,
  output ext_llr_t      le,
  output llr_t          llr,
  output logic          hard
);

  localparam int SM_MIN = -(1 << (SM_W - 1)) + 1;

  sm_t alpha_q [NSTATE];
  sm_t beta_q  [NSTATE];
  logic [NSTATE*SM_W-1:0] amem [L];

  // ---- branch metrics of the current step ---------------------------------
  logic signed [31:0] gam [NSTATE][2];
  always_comb begin
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 2; u++) begin
        int g;
        g = 0;
        if (u == 1) g = int'(din.ls) + int'(din.la);
        if (rsc_parity(3'(s), u[0])) g = g + int'(din.lp);
        gam[s][u] = g;
      end
    end
  end

  // ---- forward recursion ------------------------------------------------------
  sm_t alpha_n [NSTATE];
  logic signed [31:0] f_acc  [NSTATE];
  logic               f_seen [NSTATE];
  logic signed [31:0] f_max;
  always_comb begin
    for (int s = 0; s < NSTATE; s++) begin
      f_acc[s]  = 0;
      f_seen[s] = 1'b0;
    end
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 2; u++) begin
        int ns;
        int c;
        ns = int'(rsc_next(3'(s), u[0]));
        c  = int'(alpha_q[s]) + gam[s][u];
        f_acc[ns]  = f_seen[ns] ? maxstar(f_acc[ns], c) : c;
        f_seen[ns] = 1'b1;
      end
    end
    f_max = f_acc[0];
    for (int s = 1; s < NSTATE; s++) if (f_acc[s] > f_max) f_max = f_acc[s];
    for (int s = 0; s < NSTATE; s++) begin
      int v;
      v = f_acc[s] - f_max;
      if (v < SM_MIN) v = SM_MIN;
      alpha_n[s] = sm_t'(v);
    end
  end

  // ---- backward recursion and LLR ----------------------------------------------
  sm_t alpha_t [NSTATE];
  sm_t beta_n  [NSTATE];
  logic signed [31:0] llr_i;
  logic signed [31:0] b_m     [2];
  logic               b_mseen [2];
  logic signed [31:0] b_acc   [NSTATE];
  logic signed [31:0] b_max;
  always_comb begin
    for (int s = 0; s < NSTATE; s++)
      alpha_t[s] = amem[step][s*SM_W +: SM_W];
    b_mseen[0] = 1'b0;
    b_mseen[1] = 1'b0;
    b_m[0] = 0;
    b_m[1] = 0;
    for (int s = 0; s < NSTATE; s++) begin
      int b0, b1;
      b0 = int'(beta_q[rsc_next(3'(s), 1'b0)]) + gam[s][0];
      b1 = int'(beta_q[rsc_next(3'(s), 1'b1)]) + gam[s][1];
      b_acc[s] = maxstar(b0, b1);
      for (int u = 0; u < 2; u++) begin
        int c;
        c = int'(alpha_t[s]) + ((u == 0) ? b0 : b1);
        b_m[u]     = b_mseen[u] ? maxstar(b_m[u], c) : c;
        b_mseen[u] = 1'b1;
      end
    end
    llr_i = b_m[1] - b_m[0];
    b_max = b_acc[0];
    for (int s = 1; s < NSTATE; s++) if (b_acc[s] > b_max) b_max = b_acc[s];
    for (int s = 0; s < NSTATE; s++) begin
      int v;
      v = b_acc[s] - b_max;
      if (v < SM_MIN) v = SM_MIN;
      beta_n[s] = sm_t'(v);
    end
  end

  assign llr  = llr_t'(sat(llr_i, LLR_W));
  assign le   = ext_llr_t'(sat(llr_i - int'(din.ls) - int'(din.la), EXT_W));
  assign hard = (llr_i > 0);

  // ---- state ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (fwd) begin
      for (int s = 0; s < NSTATE; s++)
        amem[step][s*SM_W +: SM_W] <= alpha_q[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATE; s++) begin
        alpha_q[s] <= (s == 0) ? sm_t'(0) : SM_NEG_INF;
        beta_q[s]  <= (s == 0) ? sm_t'(0) : SM_NEG_INF;
      end
    end else if (init) begin
      for (int s = 0; s < NSTATE; s++) begin
        alpha_q[s] <= (s == 0) ? sm_t'(0) : SM_NEG_INF;
        beta_q[s]  <= (s == 0) ? sm_t'(0) : SM_NEG_INF;
      end
    end else begin
      if (fwd) alpha_q <= alpha_n;
      if (bwd) beta_q  <= beta_n;
    end
  end

  assert property (@(posedge clk) !(fwd && bwd))
    else $error("siso_logmap: fwd and bwd in the same cycle");

endmodule
