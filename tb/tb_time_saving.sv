// tb_time_saving: decoding-time comparison of the evaluated terminations of
// a 1000-bit frame, 6 iterations: one terminated block (Q = 1, K = 1000,
// SISO length 1003), 2-point (Q = 2, K = 500, length 503) and 5-point
// (Q = 5, K = 200, length 203) termination. The same decoder RTL is built at
// the three sizes and fed one noisy frame each; the cycles from the last
// input symbol to the first decision are measured, must equal
// 2 + 2*6*(2(K+3)+1), and the savings against Q = 1 must come within
// 0.1 percentage point of 49.85 % and 79.76 %. All three must decode the
// frame without error.
module tb_time_saving;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
  localparam int N = 1000, ITER = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one decoder per configuration
  logic      iv [3], ir [3], ov [3], ob [3], ol [3], bz [3];
  soft_sym_t is  [3];
  int        lat [3];
  localparam int QS [3]  = '{1, 2, 5};
  localparam int KS [3]  = '{1000, 500, 200};
  localparam int F1S [3] = '{3, 3, 13};
  localparam int F2S [3] = '{10, 10, 50};

  for (genvar c = 0; c < 3; c++) begin : g_cfg
    turbo_decoder_mpt #(.Q(QS[c]), .K(KS[c]), .ITER(ITER), .F1(F1S[c]), .F2(F2S[c])) u_dec (
      .clk, .rst_n, .in_valid(iv[c]), .in_sym(is[c]), .in_ready(ir[c]),
      .out_valid(ov[c]), .out_bit(ob[c]), .out_last(ol[c]), .busy(bz[c])
    );

    initial begin
      bit x[];
      sym_s sy[$];
      int t_last, n, err;
      iv[c] = 0; is[c] = '0; lat[c] = -1;
      x = new[N];
      foreach (x[i]) x[i] = 1'($urandom);
      ref_encode(x, QS[c], KS[c], F1S[c], F2S[c], sy);
      wait (rst_n);
      @(posedge clk); #1;
      foreach (sy[i]) begin
        iv[c] = 1;
        is[c].s0 = ch_llr_t'(channel(sy[i].b0, 6, 8));
        is[c].s1 = ch_llr_t'(channel(sy[i].b1, 6, 8));
        is[c].s2 = (sy[i].kind == 0) ? ch_llr_t'(channel(sy[i].b2, 6, 8)) : '0;
        @(posedge clk); #1;
      end
      iv[c] = 0;
      t_last = $time / 10;
      n = 0; err = 0;
      while (n < N) begin
        @(posedge clk); #1;
        if (ov[c]) begin
          if (n == 0) lat[c] = $time / 10 - t_last;
          if (ob[c] != x[n]) err++;
          n++;
        end
      end
      checks++;
      if (err != 0) begin failures++; $display("Q=%0d: %0d bit errors", QS[c], err); end
      checks++;
      if (lat[c] != 2 + 2 * ITER * (2 * (KS[c] + 3) + 1)) begin
        failures++;
        $display("Q=%0d: latency %0d", QS[c], lat[c]);
      end
    end
  end

  initial begin
    real s2, s5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (lat[0] > 0 && lat[1] > 0 && lat[2] > 0);
    repeat (N + 10) @(posedge clk);
    s2 = 100.0 * (1.0 - real'(lat[1]) / real'(lat[0]));
    s5 = 100.0 * (1.0 - real'(lat[2]) / real'(lat[0]));
    $display("decoding cycles: Q=1 %0d, Q=2 %0d, Q=5 %0d; saving 2-point %.2f %%, 5-point %.2f %%",
             lat[0], lat[1], lat[2], s2, s5);
    checks++;
    if (s2 < 49.75 || s2 > 49.95) failures++;
    checks++;
    if (s5 < 79.66 || s5 > 79.86) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
