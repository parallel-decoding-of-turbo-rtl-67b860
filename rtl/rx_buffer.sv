// rx_buffer: memories for the received (channel) soft values of one frame.
//
// Received systematic, parity-1 and parity-2 values are each stored in Q
// banks, bank j holding sub-block j, so that Q sub-block decoders can read
// them in the same cycle; the tail values of each sub-block (T_j of encoder 1,
// T'_j of encoder 2, three (t, z) pairs each) are kept apart in small
// registers. Systematic values stay in natural order; the second decoder
// reads them through the collision-free interleaver, which addresses the
// same word in every bank, so one common read address serves all banks.
// Parity values are read linearly by their own decoder.
//
// Write side: soft symbols arrive one per cycle in transmission order
// (per sub-block: K data symbols, 3 tail symbols of encoder 1, 3 of encoder
// 2) on in_valid/in_sym while in_ready is high. After the last symbol of the
// frame `full` is raised and in_ready drops until `release` (the decoder has
// finished with the frame). Read side: combinational, all banks at once.
module rx_buffer
  import turbo_pkg::*;
#(
  parameter int unsigned Q = Q_DEF,
  parameter int unsigned K = K_DEF,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // symbol stream in
  input  logic          in_valid,
  input  soft_sym_t     in_sym,
  output logic          in_ready,
  output logic          full,
  input  logic          release_i,
  // reads
  input  logic [AW-1:0] sys_addr,
  input  logic [AW-1:0] par_addr,
  input  logic [1:0]    tail_idx,
  output ch_llr_t       sys_rd   [Q],
  output ch_llr_t       p1_rd    [Q],
  output ch_llr_t       p2_rd    [Q],
  output ch_llr_t       t1_sys   [Q],  // tail of encoder 1: t
  output ch_llr_t       t1_par   [Q],  //                    z
  output ch_llr_t       t2_sys   [Q],  // tail of encoder 2: t'
  output ch_llr_t       t2_par   [Q]   //                    z'
);

  typedef enum logic [1:0] {W_DATA, W_TAIL1, W_TAIL2} wphase_e;
  wphase_e       wph;
  logic [QW-1:0] wj;
  logic [AW-1:0] wt;
  logic          acc;

  assign in_ready = !full;
  assign acc      = in_valid && !full;

  ch_llr_t tail1_s [Q][TAIL];
  ch_llr_t tail1_p [Q][TAIL];
  ch_llr_t tail2_s [Q][TAIL];
  ch_llr_t tail2_p [Q][TAIL];

  for (genvar b = 0; b < Q; b++) begin : g_bank
    logic we;
    assign we = acc && (wph == W_DATA) && (wj == QW'(b));

    bank_ram #(.DEPTH(K), .W(CH_W)) u_sys (
      .clk, .we, .waddr(wt), .wdata(in_sym.s0), .raddr(sys_addr), .rdata(sys_rd[b])
    );
    bank_ram #(.DEPTH(K), .W(CH_W)) u_p1 (
      .clk, .we, .waddr(wt), .wdata(in_sym.s1), .raddr(par_addr), .rdata(p1_rd[b])
    );
    bank_ram #(.DEPTH(K), .W(CH_W)) u_p2 (
      .clk, .we, .waddr(wt), .wdata(in_sym.s2), .raddr(par_addr), .rdata(p2_rd[b])
    );

    always_ff @(posedge clk) begin
      if (acc && wj == QW'(b) && wph == W_TAIL1) begin
        tail1_s[b][wt[1:0]] <= in_sym.s0;
        tail1_p[b][wt[1:0]] <= in_sym.s1;
      end
      if (acc && wj == QW'(b) && wph == W_TAIL2) begin
        tail2_s[b][wt[1:0]] <= in_sym.s0;
        tail2_p[b][wt[1:0]] <= in_sym.s1;
      end
    end

    assign t1_sys[b] = tail1_s[b][tail_idx];
    assign t1_par[b] = tail1_p[b][tail_idx];
    assign t2_sys[b] = tail2_s[b][tail_idx];
    assign t2_par[b] = tail2_p[b][tail_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wph  <= W_DATA;
      wj   <= '0;
      wt   <= '0;
      full <= 1'b0;
    end else begin
      if (release_i) full <= 1'b0;
      if (acc) begin
        unique case (wph)
          W_DATA: begin
            if (wt == AW'(K - 1)) begin
              wt  <= '0;
              wph <= W_TAIL1;
            end else wt <= wt + 1'b1;
          end
          W_TAIL1: begin
            if (wt == AW'(TAIL - 1)) begin
              wt  <= '0;
              wph <= W_TAIL2;
            end else wt <= wt + 1'b1;
          end
          W_TAIL2: begin
            if (wt == AW'(TAIL - 1)) begin
              wt  <= '0;
              wph <= W_DATA;
              if (wj == QW'(Q - 1)) begin
                wj   <= '0;
                full <= 1'b1;
              end else wj <= wj + 1'b1;
            end else wt <= wt + 1'b1;
          end
          default: wph <= W_DATA;
        endcase
      end
    end
  end

endmodule
