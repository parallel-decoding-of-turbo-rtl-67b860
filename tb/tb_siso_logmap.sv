// tb_siso_logmap: runs the Log-MAP SISO on sub-blocks (K = 200 data steps
// plus 3 tail steps) built from random bits encoded and passed through a
// noisy channel, with random a-priori values, and compares the extrinsic
// value, the a-posteriori LLR and the decision of every step with the
// reference Log-MAP model. Also checks the 2(K+3)-cycle schedule: one step per
// cycle in each direction.
module tb_siso_logmap;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
  localparam int K = 200, L = K + 3;
  logic clk = 0, rst_n = 0, init = 0, fwd = 0, bwd = 0;
  logic [7:0] step = 0;
  siso_in_t din;
  ext_llr_t le;
  llr_t llr;
  logic hard;
  int checks = 0, failures = 0;

  siso_logmap dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ls[], lp[], la[], rle[], rllr[];
    ls = new[L]; lp = new[L]; la = new[L];
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int blk = 0; blk < 6; blk++) begin
      bit d[3];
      int amp, spread, t0;
      amp = 2 + blk * 2; spread = 4 + blk * 3;
      d[0] = 0; d[1] = 0; d[2] = 0;
      for (int k = 0; k < L; k++) begin
        bit u, p;
        u = (k < K) ? 1'($urandom) : (d[1] ^ d[2]);
        p = rsc_step(d, u);
        ls[k] = channel(u, amp, spread);
        lp[k] = channel(p, amp, spread);
        la[k] = (k < K && blk > 0) ? sat(int'($urandom_range(60, 0)) - 30 + (u ? 10 : -10), EXTW) : 0;
      end
      ref_siso(ls, lp, la, K, rle, rllr);
      init = 1; @(posedge clk); #1; init = 0;
      t0 = $time / 10;
      for (int k = 0; k < L; k++) begin
        fwd = 1; step = 8'(k);
        din.ls = ch_llr_t'(ls[k]); din.lp = ch_llr_t'(lp[k]); din.la = ext_llr_t'(la[k]);
        @(posedge clk); #1;
      end
      fwd = 0;
      for (int k = L - 1; k >= 0; k--) begin
        bwd = 1; step = 8'(k);
        din.ls = ch_llr_t'(ls[k]); din.lp = ch_llr_t'(lp[k]); din.la = ext_llr_t'(la[k]);
        #1;
        if (k < K) begin
          checks++;
          if (int'(le) != rle[k] || int'(llr) != rllr[k] || hard != (rllr[k] > 0)) begin
            failures++;
            if (failures < 10)
              $display("blk %0d k %0d: le %0d/%0d llr %0d/%0d", blk, k, le, rle[k], llr, rllr[k]);
          end
        end
        @(posedge clk); #1;
      end
      bwd = 0;
      checks++;
      if (($time / 10) - t0 != 2 * L) begin failures++; $display("cycles %0d", ($time / 10) - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
