// tb_cf_crossbar: drives random words through the gather (bank to SISO) and
// scatter (SISO to bank) rotators for every rotation, checks both against
// out[j] = in[(j + rot) mod Q] and its inverse, and checks that scatter
// after gather gives back the input.
module tb_cf_crossbar;
  localparam int Q = 5, W = 8;
  logic [2:0]   rot;
  logic [W-1:0] din [Q], mid [Q], back [Q];
  int checks = 0, failures = 0;

  cf_crossbar #(.Q(Q), .W(W), .INVERSE(1'b0)) u_g (.rot, .din(din), .dout(mid));
  cf_crossbar #(.Q(Q), .W(W), .INVERSE(1'b1)) u_s (.rot, .din(mid), .dout(back));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      rot = 3'(n % Q);
      foreach (din[j]) din[j] = W'($urandom);
      #1;
      for (int j = 0; j < Q; j++) begin
        checks++;
        if (mid[j] !== din[(j + n % Q) % Q]) begin
          failures++;
          $display("gather rot=%0d j=%0d", n % Q, j);
        end
        checks++;
        if (back[j] !== din[j]) begin
          failures++;
          $display("scatter rot=%0d j=%0d", n % Q, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
