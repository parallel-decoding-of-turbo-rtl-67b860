// turbo_decoder_mpt: parallel turbo decoder for multi-point terminated
// frames.
//
// Because both constituent encoders are terminated at Q points, each of the
// Q sub-blocks (K data steps plus 3 tail steps) is an independent trellis and
// gets its own Log-MAP SISO; the Q SISOs run in lock-step, so a half-iteration
// takes about 2(K+3) cycles instead of 2(N+3).
//
// Memories: received systematic/parity values (rx_buffer), two extrinsic
// memories and the decisions, each split into Q banks of K words.
//   rx_buffer, decisions and ext_nat: bank j = sub-block j in natural order.
//   ext_il: bank j, address t = interleaved position jK + t, i.e. step t of
//     sub-block j of decoder 2.
// Each extrinsic value is written, in the backward pass, straight into the
// order the other decoder consumes, so every SISO reads its a-priori values
// linearly from its own bank at address t:
//   hi = 0 (decoder 1): SISO j reads sys/parity 1/ext_nat at (bank j, t) and
//     writes Le of natural position (j, t) into ext_il. That position is
//     interleaved position j'K + t' with t' = g^-1(t), j' = (j - t') mod Q:
//     all Q SISOs share the address g^-1(t) and the crossbar rotates by
//     g^-1(t) mod Q (cf_interleaver's inverse outputs).
//   hi = 1 (decoder 2): SISO j reads parity 2 and ext_il at (bank j, t) and
//     the systematic value at natural (bank (j + t) mod Q, address g(t)); it
//     writes Le back to natural position ((j + t) mod Q, g(t)) in ext_nat.
// At every step the Q SISOs address Q distinct banks at one common address,
// so no access ever collides and no combining or segmenting of extrinsic
// values is needed; the rotating crossbars (cf_crossbar) do the
// (de)interleaving. Tail steps read the stored tail values of the active
// encoder with a zero a-priori input; the first half-iteration uses a zero
// a-priori input throughout, so the extrinsic memories need no clearing.
// After ITER iterations the sign of the a-posteriori LLR of decoder 2 is
// written, deinterleaved, into the decision banks and streamed out.
//
// Following the architecture of the scheme: one SISO per terminated
// sub-block, memories banked by sub-block, a collision-free interleaver in
// place of combining and segmenting units, extrinsic values stored in the
// order they are read, hard decisions after a fixed number of iterations.
// This design's own choices: one SISO set shared by both constituent
// decoders in alternate half-iterations, the two extrinsic memories with a
// g^-1 table for the interleaved one, and the cycle schedule.
//
// Interface: soft symbols in (see rx_buffer) on in_valid/in_sym/in_ready;
// decisions out one per cycle on out_valid/out_bit, natural order, out_last
// on the N-th. The first decision is valid 2 + 2*ITER*(2(K+3)+1) clock
// edges after the edge that takes the last input symbol (4 886 cycles at the
// defaults), and the N decisions follow on consecutive
// cycles. The input is refused (in_ready low) from the last symbol of a frame
// until its decisions have been streamed out.
module turbo_decoder_mpt
  import turbo_pkg::*;
#(
  parameter int unsigned Q    = Q_DEF,
  parameter int unsigned K    = K_DEF,
  parameter int unsigned ITER = ITER_DEF,
  parameter int unsigned F1   = QPP_F1_DEF,
  parameter int unsigned F2   = QPP_F2_DEF,
  localparam int unsigned L  = K + TAIL,
  localparam int unsigned SW = $clog2(L),
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  soft_sym_t in_sym,
  output logic      in_ready,
  output logic      out_valid,
  output logic      out_bit,
  output logic      out_last,
  output logic      busy
);

  // ---- control ------------------------------------------------------------
  logic          full, release_c;
  logic          init, fwd, bwd, hi, first_hi, last_hi;
  logic [SW-1:0] step;
  logic          il_load, il_up, il_down;
  logic          out_phase, out_last_c;
  logic [QW-1:0] out_bank;
  logic [AW-1:0] out_addr;

  turbo_dec_ctrl #(.Q(Q), .K(K), .ITER(ITER)) u_ctrl (
    .clk, .rst_n, .start(full),
    .init, .fwd, .bwd, .step, .hi, .first_hi, .last_hi,
    .il_load, .il_up, .il_down,
    .out_phase, .out_bank, .out_addr, .out_last(out_last_c),
    .release_o(release_c), .busy
  );

  logic [AW-1:0] g_addr;
  logic [QW-1:0] g_rot;
  logic [AW-1:0] gi_addr;
  logic [QW-1:0] gi_rot;

  cf_interleaver #(.Q(Q), .K(K), .F1(F1), .F2(F2)) u_il (
    .clk, .rst_n, .load(il_load), .up(il_up), .down(il_down),
    .addr(g_addr), .rot(g_rot), .inv_addr(gi_addr), .inv_rot(gi_rot)
  );

  // step classification and effective address / rotation
  logic          data_step;
  logic [AW-1:0] lin_addr, eff_addr;
  logic [QW-1:0] eff_rot;
  logic [1:0]    tail_idx;

  always_comb begin
    data_step = (int'(step) < K);
    lin_addr  = data_step ? AW'(step) : '0;
    eff_addr  = hi ? g_addr : lin_addr;
    eff_rot   = hi ? g_rot : '0;
    tail_idx  = data_step ? 2'd0 : 2'(int'(step) - K);
  end

  // ---- received values ----------------------------------------------------
  ch_llr_t sys_bank [Q], p1_bank [Q], p2_bank [Q];
  ch_llr_t t1s [Q], t1p [Q], t2s [Q], t2p [Q];

  rx_buffer #(.Q(Q), .K(K)) u_rx (
    .clk, .rst_n, .in_valid, .in_sym, .in_ready, .full, .release_i(release_c),
    .sys_addr(eff_addr), .par_addr(lin_addr), .tail_idx,
    .sys_rd(sys_bank), .p1_rd(p1_bank), .p2_rd(p2_bank),
    .t1_sys(t1s), .t1_par(t1p), .t2_sys(t2s), .t2_par(t2p)
  );

  // ---- extrinsic and decision banks ------------------------------------------
  logic [CH_W-1:0]  sys_bank_w [Q], sys_siso_w [Q];
  logic [EXT_W-1:0] nat_rd [Q], il_rd [Q];
  logic [EXT_W-1:0] ext_siso_w [Q], nat_wd [Q], il_wd [Q];
  logic [0:0]       hard_siso [Q], hard_bank [Q];
  logic [0:0]       dec_rd [Q];
  logic             nat_we, il_we, dec_we;

  assign nat_we = bwd && data_step && hi;
  assign il_we  = bwd && data_step && !hi;
  assign dec_we = bwd && data_step && last_hi;

  for (genvar b = 0; b < Q; b++) begin : g_bank
    assign sys_bank_w[b] = sys_bank[b];

    bank_ram #(.DEPTH(K), .W(EXT_W)) u_ext_nat (
      .clk, .we(nat_we), .waddr(g_addr), .wdata(nat_wd[b]),
      .raddr(lin_addr), .rdata(nat_rd[b])
    );
    bank_ram #(.DEPTH(K), .W(EXT_W)) u_ext_il (
      .clk, .we(il_we), .waddr(gi_addr), .wdata(il_wd[b]),
      .raddr(lin_addr), .rdata(il_rd[b])
    );
    bank_ram #(.DEPTH(K), .W(1)) u_dec (
      .clk, .we(dec_we), .waddr(g_addr), .wdata(hard_bank[b]),
      .raddr(out_addr), .rdata(dec_rd[b])
    );
  end

  // natural-order systematic banks -> SISO (interleave for decoder 2)
  cf_crossbar #(.Q(Q), .W(CH_W), .INVERSE(1'b0)) u_xb_sys (
    .rot(eff_rot), .din(sys_bank_w), .dout(sys_siso_w)
  );
  // decoder 2 -> natural order: SISO j to bank (j + t) mod Q (deinterleave)
  cf_crossbar #(.Q(Q), .W(EXT_W), .INVERSE(1'b1)) u_xb_nat (
    .rot(g_rot), .din(ext_siso_w), .dout(nat_wd)
  );
  // decoder 1 -> interleaved order: bank j' takes SISO (j' + g^-1(t)) mod Q
  cf_crossbar #(.Q(Q), .W(EXT_W), .INVERSE(1'b0)) u_xb_il (
    .rot(gi_rot), .din(ext_siso_w), .dout(il_wd)
  );
  cf_crossbar #(.Q(Q), .W(1), .INVERSE(1'b1)) u_xb_hd (
    .rot(g_rot), .din(hard_siso), .dout(hard_bank)
  );

  // ---- SISO array ---------------------------------------------------------------
  for (genvar j = 0; j < Q; j++) begin : g_siso
    siso_in_t din;
    ext_llr_t le;
    llr_t     llr;
    logic     hard;

    always_comb begin
      if (data_step) begin
        din.ls = ch_llr_t'(sys_siso_w[j]);
        din.lp = hi ? p2_bank[j] : p1_bank[j];
        din.la = first_hi ? '0 : ext_llr_t'(hi ? il_rd[j] : nat_rd[j]);
      end else begin
        din.ls = hi ? t2s[j] : t1s[j];
        din.lp = hi ? t2p[j] : t1p[j];
        din.la = '0;
      end
    end

    siso_logmap #(.K(K)) u_siso (
      .clk, .rst_n, .init, .fwd, .bwd, .step, .din,
      .le, .llr, .hard
    );

    assign ext_siso_w[j] = le;
    assign hard_siso[j]  = hard;
  end

  // ---- decision output ------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= out_phase;
      out_bit   <= dec_rd[out_bank];
      out_last  <= out_last_c;
    end
  end

endmodule
