// tb_ber_sweep: error-rate curves over a BPSK/AWGN channel for the three
// terminations of a 1000-bit frame with 6 iterations (5-point default build,
// 2-point Q = 2 / K = 500, single block Q = 1 / K = 1000; same decoders as
// tb_ber_awgn), at Eb/N0 = 0, 0.25 and 0.5 dB with FRAMES = 200 frames per
// point. Channel LLRs are quantised to the 6-bit, 0.25-step decoder input and
// each rate includes the tail bits, r = N / (3N + 12Q).
// Checks: every frame is decoded (N outputs, out_last on the last); for each
// build the BER does not rise with Eb/N0; and in this low-SNR region the
// terminated builds stay close to the single block: at each point their BER
// is at most 1.5 times the single block's plus 2e-3. The measured BER and FER
// are printed as a table.
module tb_ber_sweep;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
  localparam int N = 1000, FRAMES = 200, NCFG = 3, NSNR = 3;
  localparam real SNR [NSNR] = '{0.0, 0.25, 0.5};
  // per configuration: Q, K, F1, F2, published BER and FER
  localparam int  CQ  [NCFG] = '{5, 2, 1};
  localparam int  CK  [NCFG] = '{200, 500, 1000};
  localparam int  CF1 [NCFG] = '{QPP_F1_DEF, 3, 3};
  localparam int  CF2 [NCFG] = '{QPP_F2_DEF, 10, 10};
  real ber_tab [NCFG][NSNR];

  logic clk = 0, rst_n = 0;
  logic in_valid [NCFG];
  logic in_ready [NCFG], out_valid [NCFG], out_bit [NCFG], out_last [NCFG], busy [NCFG];
  soft_sym_t in_sym;
  int checks = 0, failures = 0;

  turbo_decoder_mpt #(.Q(5), .K(200), .ITER(6), .F1(QPP_F1_DEF), .F2(QPP_F2_DEF)) dut5 (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_sym, .in_ready(in_ready[0]),
    .out_valid(out_valid[0]), .out_bit(out_bit[0]), .out_last(out_last[0]), .busy(busy[0])
  );
  turbo_decoder_mpt #(.Q(2), .K(500), .ITER(6), .F1(3), .F2(10)) dut2 (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_sym, .in_ready(in_ready[1]),
    .out_valid(out_valid[1]), .out_bit(out_bit[1]), .out_last(out_last[1]), .busy(busy[1])
  );
  turbo_decoder_mpt #(.Q(1), .K(1000), .ITER(6), .F1(3), .F2(10)) dut1 (
    .clk, .rst_n, .in_valid(in_valid[2]), .in_sym, .in_ready(in_ready[2]),
    .out_valid(out_valid[2]), .out_bit(out_bit[2]), .out_last(out_last[2]), .busy(busy[2])
  );

  always #5 clk = ~clk;

  // cycles per frame: Q(K+6) in + 2 + 12(2(K+3)+1) decoding + N out, summed
  // over the three configurations, with margin
  initial begin
    repeat (NSNR * FRAMES * 50000 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_config(int c, int si);
    int q, k, raw, bit_err, frame_err;
    real rate, ber, fer, EBN0;
    EBN0 = SNR[si];
    q = CQ[c]; k = CK[c];
    rate = real'(N) / real'(3 * N + 12 * q);
    raw = 0; bit_err = 0; frame_err = 0;
    for (int f = 0; f < FRAMES; f++) begin
      bit x[];
      sym_s sy[$];
      int n, e;
      x = new[N];
      foreach (x[i]) x[i] = 1'($urandom);
      ref_encode(x, q, k, CF1[c], CF2[c], sy);
      foreach (sy[i]) begin
        in_valid[c] = 1;
        in_sym.s0 = ch_llr_t'(awgn_llr(sy[i].b0, EBN0, rate));
        in_sym.s1 = ch_llr_t'(awgn_llr(sy[i].b1, EBN0, rate));
        in_sym.s2 = (sy[i].kind == 0) ? ch_llr_t'(awgn_llr(sy[i].b2, EBN0, rate)) : '0;
        if (sy[i].kind == 0 && ((in_sym.s0 > 0) != sy[i].b0)) raw++;
        @(posedge clk); #1;
      end
      in_valid[c] = 0;
      n = 0; e = 0;
      while (n < N) begin
        @(posedge clk); #1;
        if (out_valid[c]) begin
          if (out_bit[c] != x[n]) e++;
          checks++;
          if (out_last[c] != (n == N - 1)) failures++;
          n++;
        end
      end
      bit_err += e;
      if (e != 0) frame_err++;
      repeat (2) @(posedge clk); #1;
    end
    ber = real'(bit_err) / real'(N * FRAMES);
    fer = real'(frame_err) / real'(FRAMES);
    $display("Q=%0d K=%0d rate %.4f, Eb/N0 %.2f dB, %0d frames: raw BER %.4f, decoded BER %.2e (%0d bits), FER %.3f (%0d frames)",
             q, k, rate, EBN0, FRAMES, real'(raw) / real'(N * FRAMES), ber, bit_err, fer, frame_err);
    ber_tab[c][si] = ber;
  endtask

  initial begin
    foreach (in_valid[c]) in_valid[c] = 0;
    in_sym = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int si = 0; si < NSNR; si++)
      for (int c = 0; c < NCFG; c++) run_config(c, si);
    $display("Eb/N0 dB   BER 5-point  BER 2-point  BER single");
    for (int si = 0; si < NSNR; si++)
      $display("%5.2f      %.2e     %.2e     %.2e", SNR[si], ber_tab[0][si], ber_tab[1][si], ber_tab[2][si]);
    for (int c = 0; c < NCFG; c++)
      for (int si = 1; si < NSNR; si++) begin
        checks++;
        if (ber_tab[c][si] > ber_tab[c][si-1]) begin
          failures++;
          $display("Q=%0d: BER rises from %.2f to %.2f dB", CQ[c], SNR[si-1], SNR[si]);
        end
      end
    for (int c = 0; c < NCFG - 1; c++)
      for (int si = 0; si < NSNR; si++) begin
        checks++;
        if (ber_tab[c][si] > 1.5 * ber_tab[NCFG-1][si] + 2.0e-3) begin
          failures++;
          $display("Q=%0d at %.2f dB: BER %.2e far above the single block's %.2e",
                   CQ[c], SNR[si], ber_tab[c][si], ber_tab[NCFG-1][si]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
