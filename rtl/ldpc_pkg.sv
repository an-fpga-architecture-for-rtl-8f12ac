// ldpc_pkg: constants and helper functions shared by the LDPC encoder and decoder.
//
// The default code is the (n=7, m=4, r=3) example code. Its parity-check matrix H is already
// in the systematic form H = [P | I], so the generator matrix is G = [I | P^T]: codeword bit k
// is source bit k for k < m, and for k >= m it is the parity of the source bits selected by
// row k-m of P. Matrices are stored with ascending packed ranges, so that H[i][j] is the entry
// in row i, column j exactly as the matrix is written on paper, leftmost column j = 0.
// Data words use descending ranges: bit j of a word is symbol S_j.
//
// Messages are signed two's-complement fixed-point numbers, saturated to the symmetric range
// [-(2^(W-1)-1), +(2^(W-1)-1)] so that negation never overflows. Message width and LLR values
// are this design's choice; the number of bits per message is a parameter everywhere.
package ldpc_pkg;

  // Default code: the (7,4) example code.
  localparam int DEF_N = 7;
  localparam int DEF_R = 3;
  localparam logic [0:DEF_R-1][0:DEF_N-1] DEF_H = {
    7'b1110100,   // C0 = S0 + S1 + S2 + S4
    7'b1101010,   // C1 = S0 + S1 + S3 + S5
    7'b1011001    // C2 = S0 + S2 + S3 + S6
  };

  // Default bus width q, message width and iteration limit (this design's choices).
  localparam int DEF_Q        = 4;
  localparam int DEF_MSG_W    = 8;
  localparam int DEF_MAX_ITER = 8;

  // Largest positive message value for a W-bit message.
  function automatic int msg_max(input int w);
    return (1 << (w - 1)) - 1;
  endfunction

  // Saturate an integer to the symmetric W-bit message range.
  function automatic int sat(input int v, input int w);
    if (v > msg_max(w))  return msg_max(w);
    if (v < -msg_max(w)) return -msg_max(w);
    return v;
  endfunction

  // Number of bus beats needed for a word of `bits` bits on a `q`-bit bus.
  function automatic int beats(input int bits, input int q);
    return (bits + q - 1) / q;
  endfunction

endpackage
