// tb_turbo_decoder_mpt: decodes noisy frames with the default geometry
// (N = 1000, Q = 5 sub-blocks, 6 iterations). Frames are encoded by the
// reference encoder, sent through a quantised noisy channel and fed to the
// decoder as soft symbols. Every decision is compared with the reference
// turbo decoder (bit exact), decisions are compared with the transmitted
// bits (the noise is low enough that all errors of the raw channel must be
// corrected), the symbol input must be refused while a frame is being
// decoded, and the latency from the last input symbol to the first decision
// must be 1 + 2*ITER*(2(K+3)+1) cycles.
module tb_turbo_decoder_mpt;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
  localparam int Q = 5, K = 200, N = Q * K, ITER = 6, F1 = 13, F2 = 50;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_bit, out_last, busy;
  soft_sym_t in_sym;
  int checks = 0, failures = 0;

  turbo_decoder_mpt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_sym = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int fr = 0; fr < 3; fr++) begin
      bit x[], dec[];
      sym_s sy[$];
      int rs[], rp1[], rp2[], t1s[], t1p[], t2s[], t2p[];
      int n, raw_err, ref_err, t_last, t_first, amp, spread;
      amp = 6; spread = 9 + fr;
      x = new[N];
      foreach (x[i]) x[i] = 1'($urandom);
      ref_encode(x, Q, K, F1, F2, sy);
      rs = new[N]; rp1 = new[N]; rp2 = new[N];
      t1s = new[3 * Q]; t1p = new[3 * Q]; t2s = new[3 * Q]; t2p = new[3 * Q];
      raw_err = 0;
      n = 0;
      for (int j = 0; j < Q; j++) begin
        for (int t = 0; t < K; t++) begin
          rs[j * K + t]  = channel(sy[n].b0, amp, spread);
          rp1[j * K + t] = channel(sy[n].b1, amp, spread);
          rp2[j * K + t] = channel(sy[n].b2, amp, spread);
          if ((rs[j * K + t] > 0) != x[j * K + t]) raw_err++;
          n++;
        end
        for (int i = 0; i < 3; i++) begin
          t1s[j * 3 + i] = channel(sy[n].b0, amp, spread);
          t1p[j * 3 + i] = channel(sy[n].b1, amp, spread);
          n++;
        end
        for (int i = 0; i < 3; i++) begin
          t2s[j * 3 + i] = channel(sy[n].b0, amp, spread);
          t2p[j * 3 + i] = channel(sy[n].b1, amp, spread);
          n++;
        end
      end
      ref_decode(rs, rp1, rp2, t1s, t1p, t2s, t2p, Q, K, F1, F2, ITER, dec);
      ref_err = 0;
      foreach (dec[i]) if (dec[i] != x[i]) ref_err++;
      // feed in transmission order
      n = 0;
      for (int j = 0; j < Q; j++) begin
        for (int t = 0; t < K + 6; t++) begin
          in_valid = 1;
          if (t < K) begin
            in_sym.s0 = ch_llr_t'(rs[j * K + t]);
            in_sym.s1 = ch_llr_t'(rp1[j * K + t]);
            in_sym.s2 = ch_llr_t'(rp2[j * K + t]);
          end else if (t < K + 3) begin
            in_sym.s0 = ch_llr_t'(t1s[j * 3 + t - K]);
            in_sym.s1 = ch_llr_t'(t1p[j * 3 + t - K]);
            in_sym.s2 = '0;
          end else begin
            in_sym.s0 = ch_llr_t'(t2s[j * 3 + t - K - 3]);
            in_sym.s1 = ch_llr_t'(t2p[j * 3 + t - K - 3]);
            in_sym.s2 = '0;
          end
          checks++;
          if (!in_ready) begin failures++; $display("input refused"); end
          @(posedge clk); #1;
        end
      end
      in_valid = 0;
      t_last = $time / 10;
      @(posedge clk); #1;
      checks++;
      if (in_ready || !busy) begin failures++; $display("accepts input while decoding"); end
      n = 0;
      while (n < N) begin
        @(posedge clk); #1;
        if (out_valid) begin
          if (n == 0) t_first = $time / 10;
          checks++;
          if (out_bit != dec[n]) begin
            failures++;
            if (failures < 10) $display("frame %0d bit %0d: %b, reference %b", fr, n, out_bit, dec[n]);
          end
          checks++;
          if (out_last != (n == N - 1)) failures++;
          n++;
        end
      end
      checks++;
      if (t_first - t_last != 2 + 2 * ITER * (2 * (K + 3) + 1)) begin
        failures++;
        $display("latency %0d", t_first - t_last);
      end
      checks++;
      if (ref_err != 0) begin failures++; $display("frame %0d: %0d residual errors", fr, ref_err); end
      $display("frame %0d: raw channel errors %0d, after decoding %0d", fr, raw_err, ref_err);
      repeat (3) @(posedge clk); #1;
      checks++;
      if (!in_ready || busy) begin failures++; $display("not ready for next frame"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
