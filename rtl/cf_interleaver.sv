// cf_interleaver: address generator of the collision-free interleaver.
//
// The frame of N = Q*K bits is held in Q banks of K entries, bank b holding
// sub-block b. Interleaved position j*K + t (sub-block j, step t) reads the
// natural-order bit at
//     bank  = (j + t) mod Q,    address = g(t) = (F1*t + F2*t^2) mod K.
// At any step t all Q sub-block decoders use the same address g(t) in Q
// different banks, so the Q parallel accesses never collide, in either the
// interleaving or the deinterleaving direction. The generator therefore only
// produces the rotation r(t) = t mod Q and the common address g(t); bank
// j + r(t) is found by the rotating crossbar.
//
// The form of the interleaver (a per-step bank rotation combined with a
// quadratic permutation polynomial inside the banks) is this design's choice;
// any interleaver with the collision-free property fits the architecture.
//
// g(t) is computed without multipliers by second differences:
// g(t+1) = g(t) + d(t), d(t+1) = d(t) + 2*F2, d(0) = F1 + F2 (all mod K);
// stepping down inverts this. `load` sets t = 0; `up`/`down` move t by one
// per cycle. addr and rot are registered values for the current t.
//
// The generator also gives the inverse map for the other direction: the
// natural-order position (bank j, address t) is interleaved position
// j'K + t' with t' = g^-1(t) and j' = (j - t') mod Q, so all Q decoders
// again share one address t' and differ only by a rotation t' mod Q. g^-1
// and g^-1 mod Q come from two K-entry constant tables that the module
// computes from the polynomial at elaboration; their outputs are
// combinational from the registered t and defined for t < K.
module cf_interleaver #(
  parameter int unsigned Q  = turbo_pkg::Q_DEF,
  parameter int unsigned K  = turbo_pkg::K_DEF,
  parameter int unsigned F1 = turbo_pkg::QPP_F1_DEF,
  parameter int unsigned F2 = turbo_pkg::QPP_F2_DEF,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,   // t := 0
  input  logic          up,     // t := t + 1
  input  logic          down,   // t := t - 1
  output logic [AW-1:0] addr,     // g(t)
  output logic [QW-1:0] rot,      // t mod Q
  output logic [AW-1:0] inv_addr, // g^-1(t)          (t < K)
  output logic [QW-1:0] inv_rot   // g^-1(t) mod Q    (t < K)
);

  // Inverse permutation g^-1, computed at elaboration from the polynomial.
  typedef logic [AW-1:0] addr_tab_t [K];
  typedef logic [QW-1:0] rot_tab_t  [K];

  function automatic addr_tab_t make_inv();
    addr_tab_t tab;
    for (int t = 0; t < K; t++) begin
      logic [AW-1:0] g;
      g = AW'((longint'(F1) * t + longint'(F2) * t * t) % longint'(K));
      tab[g] = AW'(t);
    end
    return tab;
  endfunction

  function automatic rot_tab_t make_inv_rot();
    rot_tab_t tab;
    for (int t = 0; t < K; t++) begin
      logic [AW-1:0] g;
      g = AW'((longint'(F1) * t + longint'(F2) * t * t) % longint'(K));
      tab[g] = QW'(t % Q);
    end
    return tab;
  endfunction

  localparam addr_tab_t GINV     = make_inv();
  localparam rot_tab_t  GINV_ROT = make_inv_rot();

  localparam logic [AW:0] KV  = (AW+1)'(K);
  localparam logic [AW:0] D0  = (AW+1)'((F1 + F2) % K);
  localparam logic [AW:0] DD  = (AW+1)'((2 * F2) % K);
  localparam logic [QW:0] QV  = (QW+1)'(Q);

  logic [AW:0] g_q, d_q;   // one spare bit for the modular add
  logic [QW:0] r_q;
  logic [AW+1:0] t_q;      // t itself, for the inverse lookup

  function automatic logic [AW:0] add_mod(input logic [AW:0] a, input logic [AW:0] b);
    logic [AW+1:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, KV}) s = s - {1'b0, KV};
    return s[AW:0];
  endfunction

  function automatic logic [AW:0] sub_mod(input logic [AW:0] a, input logic [AW:0] b);
    logic [AW+1:0] s;
    if (a >= b) s = {1'b0, a} - {1'b0, b};
    else        s = {1'b0, a} + {1'b0, KV} - {1'b0, b};
    return s[AW:0];
  endfunction

  logic [AW:0] d_dn;
  assign d_dn = sub_mod(d_q, DD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_q <= '0;
      d_q <= D0;
      r_q <= '0;
      t_q <= '0;
    end else if (load) begin
      g_q <= '0;
      d_q <= D0;
      r_q <= '0;
      t_q <= '0;
    end else if (up) begin
      t_q <= t_q + 1'b1;
      g_q <= add_mod(g_q, d_q);
      d_q <= add_mod(d_q, DD);
      r_q <= (r_q == QV - 1'b1) ? '0 : r_q + 1'b1;
    end else if (down) begin
      t_q <= t_q - 1'b1;
      g_q <= sub_mod(g_q, d_dn);
      d_q <= d_dn;
      r_q <= (r_q == '0) ? QV - 1'b1 : r_q - 1'b1;
    end
  end

  assign addr = g_q[AW-1:0];
  assign rot  = r_q[QW-1:0];

  always_comb begin
    if (int'(t_q) < K) begin
      inv_addr = GINV[t_q[AW-1:0]];
      inv_rot  = GINV_ROT[t_q[AW-1:0]];
    end else begin
      inv_addr = '0;
      inv_rot  = '0;
    end
  end

endmodule
