// tb_cf_interleaver: steps the collision-free interleaver address generator
// up through a whole sub-block (plus tail steps) and back down, comparing
// g(t) and t mod Q with the closed form at every step, and checks that g is a
// permutation of 0..K-1, so that (bank, address) pairs cover every frame
// position exactly once. For t < K it also checks the inverse outputs:
// g(inv_addr) must equal t and inv_rot must equal inv_addr mod Q.
module tb_cf_interleaver;
  localparam int Q = 5, K = 200, F1 = 13, F2 = 50, L = K + 3;
  logic clk = 0, rst_n = 0, load = 0, up = 0, down = 0;
  logic [7:0] addr;
  logic [2:0] rot;
  logic [7:0] inv_addr;
  logic [2:0] inv_rot;
  int checks = 0, failures = 0;
  bit seen[K];

  cf_interleaver dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int g_ref(int t);
    return int'((longint'(F1) * t + longint'(F2) * t * t) % K);
  endfunction

  task automatic check_at(int t);
    checks++;
    if (int'(addr) != g_ref(t) || int'(rot) != t % Q) begin
      failures++;
      $display("t=%0d addr=%0d exp %0d rot=%0d exp %0d", t, addr, g_ref(t), rot, t % Q);
    end
    if (t < K) begin
      checks++;
      if (g_ref(int'(inv_addr)) != t || int'(inv_rot) != int'(inv_addr) % Q) begin
        failures++;
        $display("t=%0d inv_addr=%0d (g of it %0d) inv_rot=%0d", t, inv_addr,
                 g_ref(int'(inv_addr)), inv_rot);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load = 1; @(posedge clk); #1; load = 0;
    for (int t = 0; t < L; t++) begin
      check_at(t);
      if (t < K) seen[addr] = 1;
      up = 1; @(posedge clk); #1; up = 0;
    end
    check_at(L);
    for (int t = L - 1; t >= 0; t--) begin
      down = 1; @(posedge clk); #1; down = 0;
      check_at(t);
    end
    // hold
    @(posedge clk); #1;
    check_at(0);
    for (int a = 0; a < K; a++) begin
      checks++;
      if (!seen[a]) begin failures++; $display("address %0d never produced", a); end
    end
    // reload from the middle
    repeat (7) begin up = 1; @(posedge clk); #1; end
    up = 0;
    check_at(7);
    load = 1; @(posedge clk); #1; load = 0;
    check_at(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
