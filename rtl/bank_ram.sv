// bank_ram: one sub-block memory bank, DEPTH words of W bits, one write port
// and one read port.
//
// The decoder's memories (received systematic and parity values, extrinsic
// LLRs, decisions) are each split into Q such banks, one per sub-block, so
// the Q sub-block decoders can access them in the same cycle.
//
// Timing: the read is combinational (asynchronous) and returns the contents
// before any write of the same cycle; the write takes effect at the clock
// edge, so a read and a write of the same address in one cycle return the
// old word. Contents are not reset. Asynchronous read is this design's choice; it maps onto
// register files or distributed RAM.
module bank_ram #(
  parameter int unsigned DEPTH = turbo_pkg::K_DEF,
  parameter int unsigned W     = turbo_pkg::EXT_W,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
