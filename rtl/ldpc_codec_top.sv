// ldpc_codec_top: the LDPC encoder and decoder of one code, side by side in one device.
//
// Both halves are built for the same code, given by its parity-check matrix H in systematic
// form [P | I], and both use the same Q-bit bus width on their input and output sides. The
// encoder turns M-bit source words into N-bit codewords; the decoder takes N-bit received
// (hard-decision) words, corrects them with min-sum message passing and returns M-bit source
// words together with a converged flag and the number of iterations used. The two halves
// share only the clock and reset and work independently; a different code is used by
// rebuilding with a different H.
//
// Ports are grouped by half: enc_* for the encoder, dec_* for the decoder, each a pair of
// valid/ready buses. Timing is that of ldpc_encoder and ldpc_decoder. Active-low synchronous
// reset.
module ldpc_codec_top
  import ldpc_pkg::*;
#(
  parameter int                  N        = DEF_N,
  parameter int                  R        = DEF_R,
  parameter logic [0:R-1][0:N-1] H        = DEF_H,
  parameter int                  Q        = DEF_Q,
  parameter int                  W        = DEF_MSG_W,
  parameter int                  MAX_ITER = DEF_MAX_ITER,
  localparam int                 ITW      = $clog2(MAX_ITER + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // encoder: source words in, codewords out
  input  logic           enc_in_valid,
  output logic           enc_in_ready,
  input  logic [Q-1:0]   enc_in_data,
  output logic           enc_out_valid,
  input  logic           enc_out_ready,
  output logic [Q-1:0]   enc_out_data,
  // decoder: received words in, decoded source words out
  input  logic           dec_in_valid,
  output logic           dec_in_ready,
  input  logic [Q-1:0]   dec_in_data,
  output logic           dec_out_valid,
  input  logic           dec_out_ready,
  output logic [Q-1:0]   dec_out_data,
  output logic           dec_converged,
  output logic [ITW-1:0] dec_iterations
);

  ldpc_encoder #(.N(N), .R(R), .H(H), .Q(Q)) u_enc (
    .clk, .rst_n,
    .in_valid  (enc_in_valid),
    .in_ready  (enc_in_ready),
    .in_data   (enc_in_data),
    .out_valid (enc_out_valid),
    .out_ready (enc_out_ready),
    .out_data  (enc_out_data)
  );

  ldpc_decoder #(.N(N), .R(R), .H(H), .Q(Q), .W(W), .MAX_ITER(MAX_ITER)) u_dec (
    .clk, .rst_n,
    .in_valid   (dec_in_valid),
    .in_ready   (dec_in_ready),
    .in_data    (dec_in_data),
    .out_valid  (dec_out_valid),
    .out_ready  (dec_out_ready),
    .out_data   (dec_out_data),
    .converged  (dec_converged),
    .iterations (dec_iterations)
  );

endmodule
