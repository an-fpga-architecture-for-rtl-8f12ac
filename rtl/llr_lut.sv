// llr_lut: channel log-likelihood ratio of a received hard bit.
//
// For a binary symmetric channel with bit-error probability p, a received 0 has the LLR
// +ln((1-p)/p) and a received 1 the same value negated. The two values are constants fixed
// when the code is chosen, so the unit is a two-entry lookup table: LLR0 for a 0, LLR1 for a 1.
// The values are in message LSBs; their defaults (+/- 2^(W-3)) are this design's choice and
// leave headroom for the sums in the symbol node.
//
// Purely combinational.
module llr_lut #(
  parameter int W    = 8,
  parameter int LLR0 = 2 ** (W - 3),
  parameter int LLR1 = -(2 ** (W - 3))
) (
  input  logic                rx_bit,
  output logic signed [W-1:0] llr
);

  localparam logic signed [W-1:0] L0 = W'(LLR0);
  localparam logic signed [W-1:0] L1 = W'(LLR1);

  always_comb llr = rx_bit ? L1 : L0;

endmodule
