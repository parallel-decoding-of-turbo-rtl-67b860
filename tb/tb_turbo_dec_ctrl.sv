// tb_turbo_dec_ctrl: starts the sequencer and follows its outputs cycle by
// cycle against the expected schedule: for each of the 2*ITER
// half-iterations one init cycle, forward steps 0..L-1, backward steps
// L-1..0, the half-iteration flag and first/last markers; the interleaver
// load/up/down strobes; then the N output addresses in bank-major order,
// out_last, a single release pulse and the total cycle count.
module tb_turbo_dec_ctrl;
  localparam int Q = 5, K = 200, ITER = 6, L = K + 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic init, fwd, bwd, hi, first_hi, last_hi, il_load, il_up, il_down;
  logic out_phase, out_last, release_o, busy;
  logic [7:0] step;
  logic [2:0] out_bank;
  logic [7:0] out_addr;
  int checks = 0, failures = 0;

  turbo_dec_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(bit e_init, bit e_fwd, bit e_bwd, int e_step, bit e_hi,
                              bit e_first, bit e_last, bit e_up, bit e_down);
    checks++;
    if (init != e_init || fwd != e_fwd || bwd != e_bwd || hi != e_hi ||
        ((e_fwd || e_bwd) && (int'(step) != e_step || first_hi != e_first || last_hi != e_last)) ||
        il_load != e_init || il_up != e_up || il_down != e_down) begin
      failures++;
      if (failures < 10)
        $display("%0t: init %b fwd %b bwd %b step %0d hi %b first %b last %b up %b dn %b; exp step %0d",
                 $time, init, fwd, bwd, step, hi, first_hi, last_hi, il_up, il_down, e_step);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (busy) failures++;
    start = 1; @(posedge clk); #1; start = 0;
    t0 = $time / 10;
    for (int it = 0; it < ITER; it++)
      for (int h = 0; h < 2; h++) begin
        bit f, l;
        f = (it == 0 && h == 0);
        l = (it == ITER - 1 && h == 1);
        expect_cycle(1, 0, 0, 0, h[0], f, l, 0, 0);
        for (int t = 0; t < L; t++) expect_cycle(0, 1, 0, t, h[0], f, l, t != L - 1, 0);
        for (int t = L - 1; t >= 0; t--) expect_cycle(0, 0, 1, t, h[0], f, l, 0, t != 0);
      end
    for (int k = 0; k < Q * K; k++) begin
      checks++;
      if (!out_phase || int'(out_bank) != k / K || int'(out_addr) != k % K ||
          out_last != (k == Q * K - 1) || release_o) begin
        failures++;
        if (failures < 10) $display("out %0d: bank %0d addr %0d", k, out_bank, out_addr);
      end
      @(posedge clk); #1;
    end
    checks++;
    if (!release_o) failures++;
    checks++;
    if (($time / 10) - t0 != 2 * ITER * (2 * L + 1) + Q * K) begin
      failures++;
      $display("cycles %0d", ($time / 10) - t0);
    end
    @(posedge clk); #1;
    checks++;
    if (release_o || busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
