// xor_tree: modulo-2 sum of a fixed subset of the input bits.
//
// One of these computes one codeword bit in the encoder (one column of the generator matrix G)
// and one of these computes one syndrome bit in the quantizer (one row of the parity-check
// matrix H). MASK selects the inputs that take part: bit j of MASK set means in[j] is summed.
// The reduction XOR over the masked inputs is written as one expression; synthesis builds a
// balanced tree from it and, across many instances, shares common sub-sums. With a one-hot
// MASK the unit is a plain wire, as for the identity part of G.
//
// Purely combinational; no clock.
// The XOR-tree units and their use for G columns and H rows follow the architecture; leaving
// the tree shape and the sharing of sub-sums to synthesis is this design's choice.
module xor_tree #(
  parameter int              WIDTH = 4,
  parameter logic [WIDTH-1:0] MASK = {WIDTH{1'b1}}
) (
  input  logic [WIDTH-1:0] in,
  output logic             out
);

  always_comb out = ^(in & MASK);

endmodule
