// rsc_encoder: one 8-state recursive systematic convolutional encoder,
// generator polynomials (13,15) octal (feedback 1+D^2+D^3, forward 1+D+D^3),
// the constituent code of the UMTS turbo code.
//
// Each cycle with `en` high advances the encoder by one trellis step. With
// `term` low the data bit `u` is encoded; with `term` high the encoder takes
// its own feedback as input, so that three such steps bring it back to the
// all-zero state. `sys` and `par` are combinational: the systematic bit (u, or
// the tail bit t_i while terminating) and the parity bit of the step being
// taken. `clr` returns the register to the zero state. Terminating at several
// points of a frame is done by the caller asserting `term` for three steps at
// each point.
module rsc_encoder
  import turbo_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,     // synchronous return to the zero state
  input  logic en,      // take one trellis step
  input  logic term,    // terminate: input = feedback
  input  logic u,       // data bit
  output logic sys,     // systematic / tail bit of this step
  output logic par,     // parity bit of this step
  output logic [2:0] state
);

  logic [2:0] st;
  logic       u_eff;

  always_comb begin
    u_eff = term ? rsc_tail_bit(st) : u;
    sys   = u_eff;
    par   = rsc_parity(st, u_eff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   st <= '0;
    else if (clr) st <= '0;
    else if (en)  st <= rsc_next(st, u_eff);
  end

  assign state = st;

endmodule
