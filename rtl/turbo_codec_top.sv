// turbo_codec_top: multi-point terminated turbo codec, the transmit-side
// encoder and the receive-side parallel decoder side by side.
//
// The encoder turns an N-bit frame into 3N + 12Q coded bits with both RSC
// encoders terminated after every K = N/Q bits; the decoder takes the channel
// soft values of such a frame and decodes its Q sub-blocks in parallel with Q
// Log-MAP SISOs and a collision-free interleaver. The channel between the two
// (modulation, noise, demodulation to LLRs) is outside this design, so both
// halves bring their ports out: a link test feeds enc_out_* through a channel
// model into dec_in_*.
//
// Defaults: N = 1000 bits, Q = 5 termination points (K = 200), 6 iterations.
module turbo_codec_top
  import turbo_pkg::*;
#(
  parameter int unsigned Q    = Q_DEF,
  parameter int unsigned K    = K_DEF,
  parameter int unsigned ITER = ITER_DEF,
  parameter int unsigned F1   = QPP_F1_DEF,
  parameter int unsigned F2   = QPP_F2_DEF
) (
  input  logic      clk,
  input  logic      rst_n,
  // encoder
  input  logic      enc_in_valid,
  input  logic      enc_in_bit,
  output logic      enc_in_ready,
  output logic      enc_out_valid,
  output enc_sym_t  enc_out_sym,
  output logic      enc_out_last,
  // decoder
  input  logic      dec_in_valid,
  input  soft_sym_t dec_in_sym,
  output logic      dec_in_ready,
  output logic      dec_out_valid,
  output logic      dec_out_bit,
  output logic      dec_out_last,
  output logic      dec_busy
);

  turbo_encoder_mpt #(.Q(Q), .K(K), .F1(F1), .F2(F2)) u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .in_bit(enc_in_bit), .in_ready(enc_in_ready),
    .out_valid(enc_out_valid), .out_sym(enc_out_sym), .out_last(enc_out_last)
  );

  turbo_decoder_mpt #(.Q(Q), .K(K), .ITER(ITER), .F1(F1), .F2(F2)) u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_sym(dec_in_sym), .in_ready(dec_in_ready),
    .out_valid(dec_out_valid), .out_bit(dec_out_bit), .out_last(dec_out_last),
    .busy(dec_busy)
  );

endmodule
