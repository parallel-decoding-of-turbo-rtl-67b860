// tb_turbo_encoder_mpt: encodes random frames with the default geometry
// (N = 1000, Q = 5) and compares every emitted symbol with the reference
// encoder: data symbols (X, P1, P2), the terminating tail pairs of both
// encoders after every sub-block, the symbol count Q*(K+6) (3N + 12Q bits,
// rate N/(3N+12Q)), the cycle count and out_last.
module tb_turbo_encoder_mpt;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
  localparam int Q = 5, K = 200, N = Q * K, F1 = 13, F2 = 50;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0, in_ready;
  logic out_valid, out_last;
  enc_sym_t out_sym;
  int checks = 0, failures = 0;

  turbo_encoder_mpt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit x[];
    sym_s exp_q[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int fr = 0; fr < 3; fr++) begin
      int n, bits, t0, t1, lastseen;
      x = new[N];
      foreach (x[i]) x[i] = (fr == 0) ? 1'b1 : 1'($urandom);
      ref_encode(x, Q, K, F1, F2, exp_q);
      checks++;
      if (!in_ready) begin failures++; $display("not ready"); end
      for (int i = 0; i < N; i++) begin
        in_valid = 1; in_bit = x[i];
        @(posedge clk); #1;
      end
      in_valid = 0;
      t0 = $time / 10;
      n = 0; bits = 0; lastseen = 0;
      while (n < exp_q.size()) begin
        @(posedge clk); #1;
        if (out_valid) begin
          sym_s e;
          e = exp_q[n];
          checks++;
          if (int'(out_sym.kind) != e.kind || out_sym.bits[0] != e.b0 || out_sym.bits[1] != e.b1 ||
              (e.kind == 0 && out_sym.bits[2] != e.b2)) begin
            failures++;
            if (failures < 10)
              $display("frame %0d sym %0d: kind %0d bits %b, expected %0d %b%b%b", fr, n,
                       out_sym.kind, out_sym.bits, e.kind, e.b2, e.b1, e.b0);
          end
          bits += (e.kind == 0) ? 3 : 2;
          if (out_last) lastseen = n;
          n++;
        end
      end
      t1 = $time / 10;
      checks++;
      if (bits != 3 * N + 12 * Q) begin failures++; $display("bits %0d", bits); end
      checks++;
      if (lastseen != Q * (K + 6) - 1) begin failures++; $display("out_last at %0d", lastseen); end
      checks++;
      if (t1 - t0 != Q * (K + 6)) begin failures++; $display("took %0d cycles", t1 - t0); end
      @(posedge clk); #1;
      checks++;
      if (out_valid || !in_ready) begin failures++; $display("extra output / not ready"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
