// turbo_encoder_mpt: rate-1/3 turbo encoder with multi-point trellis
// termination.
//
// Two (13,15) RSC encoders are fed with the frame X and with its interleaved
// copy X'. Both are driven to the all-zero state not only at the end of the
// frame but at Q points, after every K = N/Q bits, by three tail steps each.
// The emitted frame is, for each sub-block j = 0..Q-1,
//     C_{jK} .. C_{jK+K-1}  T_j  T'_j
// with C_k = (X_k, P1_k, P2_k) and T_j / T'_j the three (t_i, z_i) tail
// pairs of encoder 1 / encoder 2: 3N + 12Q bits in all, code rate
// N / (3N + 12Q). The interleaver is the collision-free one of cf_interleaver,
// so that the decoder can work on the Q sub-blocks in parallel; X'_{jK+t} is
// X at bank (j + t) mod Q, address g(t).
//
// Interface: the frame is loaded one bit per cycle (in_valid/in_bit while
// in_ready is high, first bit X_0). Then one symbol per cycle leaves on
// out_valid/out_sym (see turbo_pkg::enc_sym_t), out_last marking the last
// one; there is no back-pressure. The first symbol appears one cycle after
// the last input bit is taken and the frame then leaves in Q*(K+6)
// consecutive cycles. Loading and encoding do
// not overlap (single frame buffer); that is this design's choice.
module turbo_encoder_mpt
  import turbo_pkg::*;
#(
  parameter int unsigned Q  = Q_DEF,
  parameter int unsigned K  = K_DEF,
  parameter int unsigned F1 = QPP_F1_DEF,
  parameter int unsigned F2 = QPP_F2_DEF,
  localparam int unsigned N  = Q * K,
  localparam int unsigned NW = $clog2(N + 1),
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  logic     in_bit,
  output logic     in_ready,
  output logic     out_valid,
  output enc_sym_t out_sym,
  output logic     out_last
);

  typedef enum logic [1:0] {S_LOAD, S_DATA, S_TAIL1, S_TAIL2} state_e;
  state_e state;

  logic          xbuf [N];
  logic [NW-1:0] wcnt;
  logic [QW-1:0] j_q;       // sub-block
  logic [AW:0]   t_q;       // step within the sub-block / tail step

  // interleaver address generator
  logic          il_load, il_up;
  logic [AW-1:0] il_addr;
  logic [QW-1:0] il_rot;

  cf_interleaver #(.Q(Q), .K(K), .F1(F1), .F2(F2)) u_il (
    .clk, .rst_n, .load(il_load), .up(il_up), .down(1'b0),
    .addr(il_addr), .rot(il_rot), .inv_addr(), .inv_rot()
  );

  // constituent encoders
  logic e1_en, e1_term, e1_u, e1_sys, e1_par;
  logic e2_en, e2_term, e2_u, e2_sys, e2_par;
  logic [2:0] e1_state, e2_state;
  logic enc_clr;

  rsc_encoder u_rsc1 (
    .clk, .rst_n, .clr(enc_clr), .en(e1_en), .term(e1_term), .u(e1_u),
    .sys(e1_sys), .par(e1_par), .state(e1_state)
  );
  rsc_encoder u_rsc2 (
    .clk, .rst_n, .clr(enc_clr), .en(e2_en), .term(e2_term), .u(e2_u),
    .sys(e2_sys), .par(e2_par), .state(e2_state)
  );

  // natural and interleaved positions of the current step
  logic [31:0] nat_pos, il_bank, il_pos;
  always_comb begin
    nat_pos = 32'(j_q) * K + 32'(t_q);
    il_bank = (32'(j_q) + 32'(il_rot)) % Q;
    il_pos  = il_bank * K + 32'(il_addr);
  end

  always_comb begin
    e1_u    = (state == S_DATA) ? xbuf[nat_pos % N] : 1'b0;
    e2_u    = (state == S_DATA) ? xbuf[il_pos % N]  : 1'b0;
    e1_en   = (state == S_DATA) || (state == S_TAIL1);
    e2_en   = (state == S_DATA) || (state == S_TAIL2);
    e1_term = (state == S_TAIL1);
    e2_term = (state == S_TAIL2);
    enc_clr = (state == S_LOAD);
    il_load = (state == S_LOAD) || (state == S_TAIL2);
    il_up   = (state == S_DATA);
  end

  assign in_ready = (state == S_LOAD);

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) xbuf[wcnt] <= in_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      wcnt      <= '0;
      j_q       <= '0;
      t_q       <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_LOAD: begin
          if (in_valid) begin
            if (wcnt == NW'(N - 1)) begin
              wcnt  <= '0;
              j_q   <= '0;
              t_q   <= '0;
              state <= S_DATA;
            end else begin
              wcnt <= wcnt + 1'b1;
            end
          end
        end
        S_DATA: begin
          out_valid     <= 1'b1;
          out_sym.kind  <= SYM_DATA;
          out_sym.bits  <= {e2_par, e1_par, e1_sys};
          if (t_q == (AW+1)'(K - 1)) begin
            t_q   <= '0;
            state <= S_TAIL1;
          end else begin
            t_q <= t_q + 1'b1;
          end
        end
        S_TAIL1: begin
          out_valid     <= 1'b1;
          out_sym.kind  <= SYM_TAIL1;
          out_sym.bits  <= {1'b0, e1_par, e1_sys};
          if (t_q == (AW+1)'(TAIL - 1)) begin
            t_q   <= '0;
            state <= S_TAIL2;
          end else begin
            t_q <= t_q + 1'b1;
          end
        end
        S_TAIL2: begin
          out_valid     <= 1'b1;
          out_sym.kind  <= SYM_TAIL2;
          out_sym.bits  <= {1'b0, e2_par, e2_sys};
          if (t_q == (AW+1)'(TAIL - 1)) begin
            t_q <= '0;
            if (j_q == QW'(Q - 1)) begin
              out_last <= 1'b1;
              j_q      <= '0;
              state    <= S_LOAD;
            end else begin
              j_q   <= j_q + 1'b1;
              state <= S_DATA;
            end
          end else begin
            t_q <= t_q + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // Both encoders must be back in the zero state after their tails.
  always_ff @(posedge clk) begin
    if (state == S_DATA && t_q == '0) begin
      assert (e1_state == 3'd0 && e2_state == 3'd0)
        else $error("RSC encoder not terminated at sub-block start");
    end
  end

endmodule
