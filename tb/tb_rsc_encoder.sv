// tb_rsc_encoder: checks the (13,15) RSC encoder against a bit-level model of
// the two generator polynomials (feedback 1+D^2+D^3, parity 1+D+D^3) on random
// data, then checks that three terminating steps return it to state zero and
// that the tail parity follows the same polynomial.
module tb_rsc_encoder;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, term = 0, u = 0;
  logic sys, par;
  logic [2:0] state;
  int checks = 0, failures = 0;
  logic d1, d2, d3;   // model delay line, d1 most recent

  rsc_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic t, input logic ub);
    logic a, ue;
    term = t; u = ub; en = 1;
    ue = t ? (d2 ^ d3) : ub;
    a  = ue ^ d2 ^ d3;
    #1;
    checks++;
    if (sys !== ue || par !== (a ^ d1 ^ d3)) begin
      failures++;
      $display("mismatch: sys=%b/%b par=%b/%b", sys, ue, par, a ^ d1 ^ d3);
    end
    @(posedge clk); #1;
    d3 = d2; d2 = d1; d1 = a;
    checks++;
    if (state !== {d1, d2, d3}) begin
      failures++;
      $display("state mismatch %b vs %b", state, {d1, d2, d3});
    end
  endtask

  initial begin
    d1 = 0; d2 = 0; d3 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int blk = 0; blk < 50; blk++) begin
      for (int k = 0; k < 40; k++) step(1'b0, 1'($urandom));
      for (int k = 0; k < 3; k++) step(1'b1, 1'($urandom));
      checks++;
      if (state !== 3'd0) begin
        failures++;
        $display("not terminated: %b", state);
      end
    end
    // clr
    step(1'b0, 1'b1);
    en = 0; clr = 1; @(posedge clk); #1; clr = 0;
    checks++;
    if (state !== 3'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
