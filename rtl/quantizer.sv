// quantizer: hard decision and codeword test.
//
// Step 1 turns each symbol's a-posteriori LLR ybar[j] into a bit: 0 when ybar[j] >= 0, 1 when
// ybar[j] < 0, which is just the sign bit. Step 2 multiplies the hard word by H^T: one
// xor_tree per row of H computes the parity of the symbols that check node takes part in.
// done is the NOR of all R parities, i.e. high when the hard word is a valid codeword.
// Only the sign bits of the LLRs are used, so the size does not depend on the message width.
// The structure (sign decisions, one parity unit per row of H, NOR) follows the architecture;
// a total LLR of exactly zero decides 0, following the decoding rule's "0 when >= 0".
//
// H is the code's parity-check matrix, H[i][j] = 1 when check C_i is connected to symbol S_j.
// Purely combinational.
module quantizer
  import ldpc_pkg::*;
#(
  parameter int                     N  = DEF_N,
  parameter int                     R  = DEF_R,
  parameter logic [0:R-1][0:N-1]    H  = DEF_H,
  parameter int                     LW = DEF_MSG_W + 2
) (
  input  logic signed [LW-1:0] ybar [N],
  output logic        [N-1:0]  yhat,
  output logic        [R-1:0]  syndrome,
  output logic                 done
);

  // Row i of H as a mask over a word whose bit j is S_j.
  function automatic logic [N-1:0] row_mask(input int i);
    logic [N-1:0] m;
    for (int j = 0; j < N; j++) m[j] = H[i][j];
    return m;
  endfunction

  always_comb
    for (int j = 0; j < N; j++) yhat[j] = ybar[j][LW-1];

  for (genvar i = 0; i < R; i++) begin : g_row
    xor_tree #(.WIDTH(N), .MASK(row_mask(i))) u_row (
      .in  (yhat),
      .out (syndrome[i])
    );
  end

  always_comb done = ~|syndrome;

endmodule
