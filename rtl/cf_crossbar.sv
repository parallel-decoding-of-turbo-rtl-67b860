// cf_crossbar: the (de)interleaving network between Q sub-block decoders and
// Q memory banks.
//
// With the collision-free interleaver, SISO j at step t works on bank
// (j + rot) mod Q, rot = t mod Q, and all SISOs use the same address. The
// network is therefore a rotator, used in two directions:
//   gather  : out[j] = in[(j + rot) mod Q]   (bank data to SISO j)
//   scatter : out[b] = in[(b - rot) mod Q]   (SISO data to bank b)
// INVERSE = 0 selects gather, 1 scatter. Purely combinational. Rotation
// instead of a full crossbar follows from this design's choice of interleaver.
module cf_crossbar #(
  parameter int unsigned Q       = turbo_pkg::Q_DEF,
  parameter int unsigned W       = 8,
  parameter bit          INVERSE = 1'b0,
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic [QW-1:0] rot,
  input  logic [W-1:0]  din  [Q],
  output logic [W-1:0]  dout [Q]
);

  always_comb begin
    for (int j = 0; j < Q; j++) begin
      int src;
      if (!INVERSE) src = (j + int'(rot)) % Q;
      else          src = (j + Q - (int'(rot) % Q)) % Q;
      dout[j] = din[src];
    end
  end

endmodule
