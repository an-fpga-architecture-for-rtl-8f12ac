// symbol_node: symbol (variable) node of degree DEG.
//
// A symbol node connected to DEG check nodes adds the channel LLR of its received bit and all
// DEG incoming check messages x[i] into one total. Each outgoing message y[i] is that total
// less x[i], i.e. the sum of everything except what check node i itself sent. The total is
// also the a-posteriori LLR (ybar) that the quantizer turns into a hard decision, so the node
// computes it once and shares it.
//
// The channel LLR comes from an llr_lut (two constants, selected by the received bit rx_bit).
// The total is kept at full precision, SW = W + clog2(DEG+1) bits, so it cannot overflow;
// each outgoing message is saturated back to the symmetric W-bit range. Plain adders are
// used; a faster carry scheme could replace them without changing the function.
// The sum-then-subtract structure and the shared total follow the architecture; the widths
// and the saturation are this design's choices.
//
// Purely combinational.
module symbol_node #(
  parameter int DEG  = 3,
  parameter int W    = 8,
  parameter int LLR0 = 2 ** (W - 3),
  parameter int LLR1 = -(2 ** (W - 3)),
  localparam int SW  = W + $clog2(DEG + 1)
) (
  input  logic                 rx_bit,
  input  logic signed [W-1:0]  x    [DEG],
  output logic signed [W-1:0]  y    [DEG],
  output logic signed [SW-1:0] ybar
);

  localparam logic signed [SW-1:0] MAXV = SW'((1 <<< (W - 1)) - 1);

  logic signed [W-1:0] llr;

  llr_lut #(.W(W), .LLR0(LLR0), .LLR1(LLR1)) u_llr (
    .rx_bit (rx_bit),
    .llr    (llr)
  );

  always_comb begin
    ybar = SW'(llr);
    for (int i = 0; i < DEG; i++) ybar += SW'(x[i]);
  end

  for (genvar i = 0; i < DEG; i++) begin : g_out
    logic signed [SW-1:0] ext;
    always_comb begin
      ext = ybar - SW'(x[i]);
      if (ext > MAXV)       y[i] = W'(MAXV);
      else if (ext < -MAXV) y[i] = W'(-MAXV);
      else                  y[i] = W'(ext);
    end
  end

endmodule
