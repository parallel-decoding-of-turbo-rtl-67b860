// tb_rx_buffer: writes a random frame of soft symbols in transmission order,
// checks in_ready/full handshaking (the buffer refuses symbols once full and
// accepts again after release), then reads every bank at every address and
// every tail entry back against the values sent.
module tb_rx_buffer;
  import turbo_pkg::*;
  localparam int Q = 5, K = 200;
  logic clk = 0, rst_n = 0, in_valid = 0, release_i = 0, in_ready, full;
  soft_sym_t in_sym;
  logic [7:0] sys_addr = 0, par_addr = 0;
  logic [1:0] tail_idx = 0;
  ch_llr_t sys_rd[Q], p1_rd[Q], p2_rd[Q], t1_sys[Q], t1_par[Q], t2_sys[Q], t2_par[Q];
  int checks = 0, failures = 0;
  int ms[Q][K], m1[Q][K], m2[Q][K], ta_s[Q][3], ta_p[Q][3], tb_s[Q][3], tb_p[Q][3];

  rx_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ch_llr_t rnd();
    return ch_llr_t'($urandom);
  endfunction

  task automatic send(ch_llr_t a, ch_llr_t b, ch_llr_t c);
    in_valid = 1; in_sym.s0 = a; in_sym.s1 = b; in_sym.s2 = c;
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int rep = 0; rep < 2; rep++) begin
      for (int j = 0; j < Q; j++) begin
        for (int t = 0; t < K; t++) begin
          ch_llr_t a, b, c;
          a = rnd(); b = rnd(); c = rnd();
          ms[j][t] = a; m1[j][t] = b; m2[j][t] = c;
          checks++;
          if (!in_ready || full) failures++;
          send(a, b, c);
        end
        for (int i = 0; i < 3; i++) begin
          ch_llr_t a, b;
          a = rnd(); b = rnd(); ta_s[j][i] = a; ta_p[j][i] = b;
          send(a, b, rnd());
        end
        for (int i = 0; i < 3; i++) begin
          ch_llr_t a, b;
          a = rnd(); b = rnd(); tb_s[j][i] = a; tb_p[j][i] = b;
          send(a, b, rnd());
        end
      end
      checks++;
      if (!full || in_ready) begin failures++; $display("not full after a frame"); end
      // refused while full
      send(6'sd1, 6'sd1, 6'sd1);
      for (int t = 0; t < K; t++) begin
        sys_addr = 8'(t); par_addr = 8'((t * 7) % K); #1;
        for (int j = 0; j < Q; j++) begin
          checks++;
          if (sys_rd[j] !== ch_llr_t'(ms[j][t]) || p1_rd[j] !== ch_llr_t'(m1[j][(t * 7) % K]) ||
              p2_rd[j] !== ch_llr_t'(m2[j][(t * 7) % K])) begin
            failures++;
            if (failures < 10) $display("bank %0d addr %0d mismatch", j, t);
          end
        end
      end
      for (int i = 0; i < 3; i++) begin
        tail_idx = 2'(i); #1;
        for (int j = 0; j < Q; j++) begin
          checks++;
          if (t1_sys[j] !== ch_llr_t'(ta_s[j][i]) || t1_par[j] !== ch_llr_t'(ta_p[j][i]) ||
              t2_sys[j] !== ch_llr_t'(tb_s[j][i]) || t2_par[j] !== ch_llr_t'(tb_p[j][i])) begin
            failures++;
            $display("tail %0d of sub-block %0d mismatch", i, j);
          end
        end
      end
      release_i = 1; @(posedge clk); #1; release_i = 0;
      checks++;
      if (full || !in_ready) begin failures++; $display("release ignored"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
