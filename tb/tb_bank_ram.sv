// tb_bank_ram: fills a bank with random words, reads them all back, then
// checks the read-old-then-write behaviour at one address in one cycle that
// the decoder's extrinsic update relies on.
module tb_bank_ram;
  localparam int DEPTH = 200, W = 8;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  bank_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = 8'(a); wdata = W'($urandom); model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      raddr = 8'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("a=%0d %h/%h", a, rdata, model[a]); end
    end
    for (int n = 0; n < 300; n++) begin
      int a;
      a = int'($urandom_range(DEPTH - 1, 0));
      raddr = 8'(a); waddr = 8'(a); we = 1; wdata = W'($urandom);
      #1;
      checks++;
      if (rdata !== model[a]) failures++;   // old value before the edge
      @(posedge clk); #1;
      model[a] = wdata;
      we = 0;
      #1;
      checks++;
      if (rdata !== model[a]) failures++;   // new value after it
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
