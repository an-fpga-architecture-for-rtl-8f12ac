// ldpc_encoder: systematic LDPC encoder, Y = X x G.
//
// The code is given by its parity-check matrix H in systematic form [P | I] (R rows, N
// columns, M = N - R source bits). The generator matrix is then G = [I | P^T] and is never
// stored: codeword bit k < M is source bit k, and codeword bit M+i is the parity of the source
// bits selected by row i of P. Each codeword bit is one xor_tree; the identity columns reduce
// to wires. A source word arrives on the Q-bit input bus into an M-bit input shift register,
// the N parallel XOR trees form the codeword in one combinational step, and the codeword is
// loaded into an N-bit output shift register that sends it out on the Q-bit output bus.
//
// Interface and timing: valid/ready buses (see bus_deserializer / bus_serializer), least
// significant beat first. A source word takes ceil(M/Q) input beats. The codeword is loaded
// into the output register at the clock edge after the one that takes the last input beat, and
// its first beat is offered from then on; a following source word can be collected while the
// codeword is still being sent. Active-low synchronous reset.
module ldpc_encoder
  import ldpc_pkg::*;
#(
  parameter int                  N = DEF_N,
  parameter int                  R = DEF_R,
  parameter logic [0:R-1][0:N-1] H = DEF_H,
  parameter int                  Q = DEF_Q,
  localparam int                 M = N - R
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [Q-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [Q-1:0] out_data
);

  // Column k of G as a mask over the source word (bit j = X_j).
  function automatic logic [M-1:0] g_column(input int k);
    logic [M-1:0] m;
    m = '0;
    if (k < M) m[k] = 1'b1;
    else for (int j = 0; j < M; j++) m[j] = H[k-M][j];
    return m;
  endfunction

  // The right R x R block of H must be the identity.
  function automatic bit is_systematic();
    for (int i = 0; i < R; i++)
      for (int j = 0; j < R; j++)
        if (H[i][M+j] != (i == j)) return 1'b0;
    return 1'b1;
  endfunction

  if (!is_systematic()) begin : g_bad_h
    $error("ldpc_encoder: H must have the form [P | I]");
  end

  logic         src_valid, src_ready;
  logic [M-1:0] src;
  logic [N-1:0] cw;

  bus_deserializer #(.Q(Q), .WIDTH(M)) u_in (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .word_valid (src_valid),
    .word_ready (src_ready),
    .word       (src)
  );

  for (genvar k = 0; k < N; k++) begin : g_col
    xor_tree #(.WIDTH(M), .MASK(g_column(k))) u_g (
      .in  (src),
      .out (cw[k])
    );
  end

  bus_serializer #(.Q(Q), .WIDTH(N)) u_out (
    .clk, .rst_n,
    .word_valid (src_valid),
    .word_ready (src_ready),
    .word       (cw),
    .out_valid, .out_ready, .out_data
  );

endmodule
