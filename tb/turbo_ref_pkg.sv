// turbo_ref_pkg: reference models used by the testbenches, written
// independently of the RTL.
//
//  - rsc_* and ref_encode: the (13,15) RSC code as two polynomials over a
//    delay line, and the multi-point terminated turbo encoder producing the
//    symbol sequence of a frame.
//  - ref_perm: the collision-free interleaver computed from its closed form,
//    pi(jK + t) = ((j + t) mod Q) * K + (F1*t + F2*t^2) mod K.
//  - ref_siso / ref_decode: a Log-MAP decoder over whole arrays of metrics,
//    with the max* correction computed from round(4*ln(1 + exp(-d/4))) in
//    floating point rather than taken from a table, and the same state-metric
//    normalisation (subtract the maximum, saturate at the bottom) as the
//    hardware, so the results are expected to agree bit for bit.
//  - channel: bipolar mapping plus approximately Gaussian noise (sum of
//    uniform variables), quantised to 6-bit LLRs; awgn_llr: BPSK over an
//    AWGN channel at a given Eb/N0 with Box-Muller noise and exact LLRs.
package turbo_ref_pkg;

  localparam int SMW    = 12;
  localparam int SM_LO  = -(1 << (SMW - 1)) + 1;
  localparam int EXTW   = 8;
  localparam int LLRW   = 14;
  localparam int CHW    = 6;

  // ---- encoder ----------------------------------------------------------------
  // delay line d[0] (newest) .. d[2]; returns {parity}, updates d
  function automatic bit rsc_step(ref bit d[3], input bit u);
    bit fb, p;
    fb = u ^ d[1] ^ d[2];          // 1 + D^2 + D^3
    p  = fb ^ d[0] ^ d[2];         // 1 + D + D^3
    d[2] = d[1]; d[1] = d[0]; d[0] = fb;
    return p;
  endfunction

  function automatic int ref_perm(int pos, int Q, int K, int F1, int F2);
    int j, t;
    longint g;
    j = pos / K;
    t = pos % K;
    g = (longint'(F1) * t + longint'(F2) * t * t) % K;
    return ((j + t) % Q) * K + int'(g);
  endfunction

  // symbol: kind 0 data {p2,p1,x}, 1 tail enc1 {z,t}, 2 tail enc2 {z,t}
  typedef struct { int kind; bit b0; bit b1; bit b2; } sym_s;

  function automatic void ref_encode(input bit x[], input int Q, input int K,
                                     input int F1, input int F2, ref sym_s out[$]);
    bit d1[3], d2[3];
    out.delete();
    for (int j = 0; j < Q; j++) begin
      for (int t = 0; t < K; t++) begin
        sym_s s;
        int pos;
        pos = j * K + t;
        s.kind = 0;
        s.b0 = x[pos];
        s.b1 = rsc_step(d1, x[pos]);
        s.b2 = rsc_step(d2, x[ref_perm(pos, Q, K, F1, F2)]);
        out.push_back(s);
      end
      for (int i = 0; i < 3; i++) begin
        sym_s s;
        bit tb;
        tb = d1[1] ^ d1[2];
        s.kind = 1; s.b0 = tb; s.b1 = rsc_step(d1, tb); s.b2 = 0;
        out.push_back(s);
      end
      for (int i = 0; i < 3; i++) begin
        sym_s s;
        bit tb;
        tb = d2[1] ^ d2[2];
        s.kind = 2; s.b0 = tb; s.b1 = rsc_step(d2, tb); s.b2 = 0;
        out.push_back(s);
      end
    end
  endfunction

  // ---- channel --------------------------------------------------------------------
  function automatic int sat(int v, int w);
    int hi, lo;
    hi = (1 << (w - 1)) - 1;
    lo = -(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // amp: mean LLR magnitude in LSBs; spread: noise amplitude in LSBs
  function automatic int channel(bit b, int amp, int spread);
    int n;
    n = 0;
    for (int i = 0; i < 4; i++) n += int'($urandom_range(2 * spread, 0)) - spread;
    return sat((b ? amp : -amp) + n / 2, CHW);
  endfunction

  // Standard normal sample (Box-Muller).
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(32'hFFFF_FFFE, 0)) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // BPSK over AWGN at a given Eb/N0 (dB) and code rate; returns the channel
  // LLR 2y/sigma^2 quantised to the 0.25 grid and saturated to CHW bits.
  function automatic int awgn_llr(bit b, real ebn0_db, real rate);
    real esn0, sigma2, y;
    esn0   = rate * (10.0 ** (ebn0_db / 10.0));
    sigma2 = 1.0 / (2.0 * esn0);
    y      = (b ? 1.0 : -1.0) + $sqrt(sigma2) * gauss();
    return sat(int'($floor(4.0 * 2.0 * y / sigma2 + 0.5)), CHW);
  endfunction

  // ---- Log-MAP ----------------------------------------------------------------------
  function automatic int corr(int d);
    real c;
    c = 4.0 * $ln(1.0 + $exp(-real'(d) / 4.0));
    return int'($floor(c + 0.5));
  endfunction

  function automatic int mstar(int a, int b);
    return ((a > b) ? a : b) + corr((a > b) ? a - b : b - a);
  endfunction

  function automatic void nxt(int s, int u, output int ns, output int p);
    bit d[3];
    d[0] = s[2]; d[1] = s[1]; d[2] = s[0];
    p  = rsc_step(d, u[0]);
    ns = {d[0], d[1], d[2]};
  endfunction

  // ls, lp, la: L = K + 3 entries each (la zero on the tail); outputs K.
  function automatic void ref_siso(input int ls[], input int lp[], input int la[],
                                   input int K, output int le[], output int llr[]);
    int L;
    int alpha[][8], beta[][8];
    L = K + 3;
    alpha = new[L + 1];
    beta  = new[L + 1];
    le    = new[K];
    llr   = new[K];
    for (int s = 0; s < 8; s++) begin
      alpha[0][s] = (s == 0) ? 0 : SM_LO;
      beta[L][s]  = (s == 0) ? 0 : SM_LO;
    end
    for (int k = 0; k < L; k++) begin
      int acc[8];
      bit got[8];
      int mx;
      foreach (got[s]) got[s] = 0;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          int ns, p, c;
          nxt(s, u, ns, p);
          c = alpha[k][s] + u * (ls[k] + la[k]) + p * lp[k];
          acc[ns] = got[ns] ? mstar(acc[ns], c) : c;
          got[ns] = 1;
        end
      mx = acc[0];
      for (int s = 1; s < 8; s++) if (acc[s] > mx) mx = acc[s];
      for (int s = 0; s < 8; s++) alpha[k+1][s] = (acc[s] - mx < SM_LO) ? SM_LO : acc[s] - mx;
    end
    for (int k = L - 1; k >= 0; k--) begin
      int acc[8];
      int m0, m1, mx;
      bit g0, g1;
      g0 = 0; g1 = 0; m0 = 0; m1 = 0;
      for (int s = 0; s < 8; s++) begin
        int bu[2];
        for (int u = 0; u < 2; u++) begin
          int ns, p;
          nxt(s, u, ns, p);
          bu[u] = beta[k+1][ns] + u * (ls[k] + la[k]) + p * lp[k];
        end
        acc[s] = mstar(bu[0], bu[1]);
        if (g0) m0 = mstar(m0, alpha[k][s] + bu[0]); else m0 = alpha[k][s] + bu[0];
        if (g1) m1 = mstar(m1, alpha[k][s] + bu[1]); else m1 = alpha[k][s] + bu[1];
        g0 = 1; g1 = 1;
      end
      mx = acc[0];
      for (int s = 1; s < 8; s++) if (acc[s] > mx) mx = acc[s];
      for (int s = 0; s < 8; s++) beta[k][s] = (acc[s] - mx < SM_LO) ? SM_LO : acc[s] - mx;
      if (k < K) begin
        llr[k] = sat(m1 - m0, LLRW);
        le[k]  = sat(m1 - m0 - ls[k] - la[k], EXTW);
      end
    end
  endfunction

  // Whole turbo decoder on one received frame. rs/rp1/rp2: N values in
  // natural / natural / interleaved order; t1s,t1p,t2s,t2p: Q*3 tail values.
  // Returns the decisions in natural order.
  function automatic void ref_decode(input int rs[], input int rp1[], input int rp2[],
                                     input int t1s[], input int t1p[],
                                     input int t2s[], input int t2p[],
                                     input int Q, input int K, input int F1, input int F2,
                                     input int ITER, output bit dec[]);
    int N;
    int ext[];
    N = Q * K;
    ext = new[N];
    dec = new[N];
    foreach (ext[i]) ext[i] = 0;
    for (int it = 0; it < ITER; it++) begin
      for (int h = 0; h < 2; h++) begin
        for (int j = 0; j < Q; j++) begin
          int ls[], lp[], la[], le[], llr[];
          int pos[];
          ls = new[K + 3]; lp = new[K + 3]; la = new[K + 3]; pos = new[K];
          for (int t = 0; t < K; t++) begin
            pos[t] = (h == 0) ? j * K + t : ref_perm(j * K + t, Q, K, F1, F2);
            ls[t]  = rs[pos[t]];
            lp[t]  = (h == 0) ? rp1[j * K + t] : rp2[j * K + t];
            la[t]  = ext[pos[t]];
          end
          for (int i = 0; i < 3; i++) begin
            ls[K + i] = (h == 0) ? t1s[j * 3 + i] : t2s[j * 3 + i];
            lp[K + i] = (h == 0) ? t1p[j * 3 + i] : t2p[j * 3 + i];
            la[K + i] = 0;
          end
          ref_siso(ls, lp, la, K, le, llr);
          for (int t = 0; t < K; t++) begin
            ext[pos[t]] = le[t];
            if (h == 1 && it == ITER - 1) dec[pos[t]] = (llr[t] > 0);
          end
        end
      end
    end
  endfunction

endpackage
