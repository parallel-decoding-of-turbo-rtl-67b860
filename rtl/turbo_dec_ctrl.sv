// turbo_dec_ctrl: sequencer of the parallel turbo decoder.
//
// Runs ITER decoding iterations on a received frame, each made of two
// half-iterations: hi = 0 (constituent decoder 1, natural order) and hi = 1
// (constituent decoder 2, interleaved order). In each half-iteration all Q
// SISOs run in lock-step on their sub-blocks:
//   INIT (1 cycle) -> FWD, step t = 0..L-1 -> BWD, step t = L-1..0
// with L = K + 3. It also steps the collision-free interleaver address
// generator along with t (load in INIT, up in FWD, down in BWD) so that its
// output always belongs to the current step. After the last half-iteration
// the OUT phase streams the N decisions in natural order (out_idx counts
// bank-major: bank = sub-block, addr = position in it), then `release_o`
// frees the receive buffer for the next frame.
//
// Cycle count per frame after `start`: 2*ITER*(2L + 1) decoding cycles plus N
// output cycles. The fixed number of iterations follows the document; the
// exact schedule is this design's choice.
module turbo_dec_ctrl #(
  parameter int unsigned Q    = turbo_pkg::Q_DEF,
  parameter int unsigned K    = turbo_pkg::K_DEF,
  parameter int unsigned ITER = turbo_pkg::ITER_DEF,
  localparam int unsigned L  = K + turbo_pkg::TAIL,
  localparam int unsigned SW = $clog2(L),
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned IW = $clog2(ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,      // a full frame is buffered
  output logic          init,
  output logic          fwd,
  output logic          bwd,
  output logic [SW-1:0] step,
  output logic          hi,         // 0: decoder 1, 1: decoder 2
  output logic          first_hi,   // a-priori input is zero
  output logic          last_hi,    // write the decisions
  output logic          il_load,
  output logic          il_up,
  output logic          il_down,
  output logic          out_phase,
  output logic [QW-1:0] out_bank,
  output logic [AW-1:0] out_addr,
  output logic          out_last,
  output logic          release_o,
  output logic          busy
);

  typedef enum logic [2:0] {C_IDLE, C_INIT, C_FWD, C_BWD, C_OUT, C_REL} cstate_e;
  cstate_e st;

  logic [IW-1:0] iter_q;
  logic          hi_q;
  logic [SW-1:0] t_q;
  logic [QW-1:0] ob_q;
  logic [AW-1:0] oa_q;

  always_comb begin
    init      = (st == C_INIT);
    fwd       = (st == C_FWD);
    bwd       = (st == C_BWD);
    step      = t_q;
    hi        = hi_q;
    first_hi  = (iter_q == '0) && !hi_q;
    last_hi   = (iter_q == IW'(ITER - 1)) && hi_q;
    il_load   = (st == C_INIT);
    il_up     = (st == C_FWD) && (t_q != SW'(L - 1));
    il_down   = (st == C_BWD) && (t_q != '0);
    out_phase = (st == C_OUT);
    out_bank  = ob_q;
    out_addr  = oa_q;
    out_last  = (st == C_OUT) && (ob_q == QW'(Q - 1)) && (oa_q == AW'(K - 1));
    release_o = (st == C_REL);
    busy      = (st != C_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= C_IDLE;
      iter_q <= '0;
      hi_q   <= 1'b0;
      t_q    <= '0;
      ob_q   <= '0;
      oa_q   <= '0;
    end else begin
      unique case (st)
        C_IDLE: if (start) begin
          iter_q <= '0;
          hi_q   <= 1'b0;
          st     <= C_INIT;
        end
        C_INIT: begin
          t_q <= '0;
          st  <= C_FWD;
        end
        C_FWD: begin
          if (t_q == SW'(L - 1)) st <= C_BWD;
          else                   t_q <= t_q + 1'b1;
        end
        C_BWD: begin
          if (t_q == '0) begin
            if (hi_q) begin
              hi_q <= 1'b0;
              if (iter_q == IW'(ITER - 1)) begin
                ob_q <= '0;
                oa_q <= '0;
                st   <= C_OUT;
              end else begin
                iter_q <= iter_q + 1'b1;
                st     <= C_INIT;
              end
            end else begin
              hi_q <= 1'b1;
              st   <= C_INIT;
            end
          end else begin
            t_q <= t_q - 1'b1;
          end
        end
        C_OUT: begin
          if (oa_q == AW'(K - 1)) begin
            oa_q <= '0;
            if (ob_q == QW'(Q - 1)) st <= C_REL;
            else                    ob_q <= ob_q + 1'b1;
          end else begin
            oa_q <= oa_q + 1'b1;
          end
        end
        C_REL:   st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
