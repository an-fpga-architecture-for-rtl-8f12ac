// check_node: sign-min (min-sum) check node of degree DEG.
//
// A check node connected to DEG symbol nodes receives one message x[k] from each and returns
// one message y[k] to each. Instead of 2*atanh(prod tanh(x/2)) it uses the sign-min
// approximation: y[k] is the minimum magnitude of all *other* inputs, carrying the product of
// the signs of all other inputs. Every output has its own sign unit (XOR of the other sign
// bits) and its own minimum unit (compare tree over the other magnitudes), so input k is
// wired to every unit except those of output k, as in the usual fully parallel check node.
//
// Number format: W-bit two's complement. A zero input counts as positive. The most negative
// code -2^(W-1) is read with magnitude 2^(W-1)-1, so outputs stay in the symmetric range.
// No extra scaling is applied to the minimum.
// The per-output sign and minimum units follow the architecture; the number format and the
// treatment of zero are this design's choices.
//
// Purely combinational.
module check_node #(
  parameter int DEG = 4,
  parameter int W   = 8
) (
  input  logic signed [W-1:0] x [DEG],
  output logic signed [W-1:0] y [DEG]
);

  logic [W-2:0] mag [DEG];
  logic         neg [DEG];

  always_comb begin
    for (int k = 0; k < DEG; k++) begin
      neg[k] = x[k][W-1];
      if (x[k] == {1'b1, {(W-1){1'b0}}})
        mag[k] = '1;
      else if (neg[k])
        mag[k] = (W-1)'(-x[k]);
      else
        mag[k] = x[k][W-2:0];
    end
  end

  for (genvar k = 0; k < DEG; k++) begin : g_out
    logic [W-2:0] min_k;
    logic         sgn_k;
    always_comb begin
      min_k = '1;
      sgn_k = 1'b0;
      for (int j = 0; j < DEG; j++) begin
        if (j != k) begin
          if (mag[j] < min_k) min_k = mag[j];
          sgn_k ^= neg[j];
        end
      end
      y[k] = sgn_k ? -$signed({1'b0, min_k}) : $signed({1'b0, min_k});
    end
  end

endmodule
