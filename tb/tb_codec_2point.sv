// tb_codec_2point: the same link test with 2-point termination (N = 1000,
// Q = 2, K = 500, interleaver pair F1 = 3, F2 = 10), the other multi-point
// configuration of the evaluation. As in the default-size test:
// random frames go into the
// encoder; every coded symbol is checked against the reference encoder, then
// mapped to a noisy 6-bit soft value and queued for the decoder, which takes
// symbols only while it is not decoding. Decoded frames must equal the
// transmitted ones.
//
// Mechanisms that must each occur at least once (counted, a failure if
// never seen): trellis termination of encoder 1 and of encoder 2 inside the
// frame (not only at its end), a decoder-2 half-iteration reading through a
// non-zero bank rotation of the collision-free interleaver, a tail step in
// the SISOs, the input stall while the decoder is busy, and raw channel
// errors that decoding corrected.
module tb_codec_2point;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
  localparam int Q = 2, K = 500, N = Q * K;
  localparam int F1 = 3, F2 = 10;
  localparam int FRAMES = 3;

  logic clk = 0, rst_n = 0;
  logic enc_in_valid = 0, enc_in_bit = 0, enc_in_ready;
  logic enc_out_valid, enc_out_last;
  enc_sym_t enc_out_sym;
  logic dec_in_valid = 0, dec_in_ready;
  soft_sym_t dec_in_sym;
  logic dec_out_valid, dec_out_bit, dec_out_last, dec_busy;

  turbo_codec_top #(.Q(Q), .K(K), .F1(F1), .F2(F2)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mid_term1 = 0, n_mid_term2 = 0, n_rot = 0, n_tail_steps = 0, n_stall = 0;
  int raw_err = 0, dec_err = 0, frames_done = 0;
  bit frames [FRAMES][];
  sym_s exp_syms [FRAMES][$];
  soft_sym_t chq [$];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: %0d frames decoded", frames_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: frames into the encoder
  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      frames[f] = new[N];
      foreach (frames[f][i]) frames[f][i] = 1'($urandom);
      ref_encode(frames[f], Q, K, F1, F2, exp_syms[f]);
    end
    dec_in_sym = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        while (!enc_in_ready) @(negedge clk);
        enc_in_valid = 1; enc_in_bit = frames[f][i];
        @(posedge clk);
      end
      @(negedge clk);
      enc_in_valid = 0;
    end
  end

  // encoder output: check and send through the channel
  initial begin
    int f = 0, n = 0, in_sb = 0;
    forever begin
      @(posedge clk);
      if (rst_n && enc_out_valid && f < FRAMES) begin
        sym_s e;
        soft_sym_t s;
        e = exp_syms[f][n];
        checks++;
        if (int'(enc_out_sym.kind) != e.kind || enc_out_sym.bits[0] != e.b0 ||
            enc_out_sym.bits[1] != e.b1 || (e.kind == 0 && enc_out_sym.bits[2] != e.b2)) begin
          failures++;
          if (failures < 10) $display("frame %0d symbol %0d differs from the reference", f, n);
        end
        if (enc_out_sym.kind == SYM_TAIL1 && n < Q * (K + 6) - 6) n_mid_term1++;
        if (enc_out_sym.kind == SYM_TAIL2 && n < Q * (K + 6) - 6) n_mid_term2++;
        s.s0 = ch_llr_t'(channel(enc_out_sym.bits[0], 6, 9));
        s.s1 = ch_llr_t'(channel(enc_out_sym.bits[1], 6, 9));
        s.s2 = (enc_out_sym.kind == SYM_DATA) ? ch_llr_t'(channel(enc_out_sym.bits[2], 6, 9)) : '0;
        if (enc_out_sym.kind == SYM_DATA && ((s.s0 > 0) != enc_out_sym.bits[0])) raw_err++;
        chq.push_back(s);
        n++;
        if (n == Q * (K + 6)) begin
          checks++;
          if (!enc_out_last) begin failures++; $display("out_last missing"); end
          n = 0;
          f++;
        end
      end
    end
  end

  // channel queue into the decoder
  always @(negedge clk) begin
    if (rst_n && chq.size() > 0) begin
      dec_in_valid <= 1'b1;
      dec_in_sym   <= chq[0];
    end else begin
      dec_in_valid <= 1'b0;
    end
  end
  always @(posedge clk) begin
    if (dec_in_valid && dec_in_ready) void'(chq.pop_front());
    if (dec_in_valid && !dec_in_ready) n_stall++;
  end

  // mechanism probes inside the decoder
  always @(posedge clk) begin
    if (dut.u_dec.fwd && dut.u_dec.hi && dut.u_dec.g_rot != '0) n_rot++;
    if (dut.u_dec.fwd && !dut.u_dec.data_step) n_tail_steps++;
  end

  // decoded output
  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      int n = 0, err = 0;
      while (n < N) begin
        @(posedge clk);
        if (rst_n && dec_out_valid) begin
          checks++;
          if (dec_out_bit != frames[f][n]) err++;
          n++;
        end
      end
      dec_err += err;
      if (err != 0) begin failures++; $display("frame %0d: %0d bit errors after decoding", f, err); end
      frames_done++;
    end
    checks += 6;
    if (n_mid_term1 == 0) begin failures++; $display("no inner termination of encoder 1"); end
    if (n_mid_term2 == 0) begin failures++; $display("no inner termination of encoder 2"); end
    if (n_rot == 0)       begin failures++; $display("no rotated interleaver access"); end
    if (n_tail_steps == 0) begin failures++; $display("no tail step"); end
    if (n_stall == 0)     begin failures++; $display("decoder input never stalled"); end
    if (raw_err == 0)     begin failures++; $display("channel made no errors"); end
    $display("inner terminations %0d/%0d, rotated steps %0d, tail steps %0d, stalls %0d",
             n_mid_term1 / 3, n_mid_term2 / 3, n_rot, n_tail_steps, n_stall);
    $display("raw channel bit errors %0d, decoded bit errors %0d in %0d frames",
             raw_err, dec_err, FRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
