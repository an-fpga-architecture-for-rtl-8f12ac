// bus_serializer: output shift register from a WIDTH-bit word to a Q-bit bus.
//
// A word is loaded whole and leaves as BEATS = ceil(WIDTH/Q) beats, least significant beat
// first: beat b is word bits [b*Q +: Q], with zeros above bit WIDTH-1 in the last beat. After
// each accepted beat the register shifts down by Q bits.
//
// Interface: valid/ready handshakes on both sides, transfers on rising clock edges where
// valid and ready are both high. word_ready is high while the register is empty; out_valid
// is high while beats remain, and out_data is held until out_ready takes it. A new word can
// be loaded on the cycle after the last beat leaves. Reset is active-low and synchronous.
// Bus width, bit order and handshake are this design's choices.
module bus_serializer #(
  parameter int Q     = 4,
  parameter int WIDTH = 7,
  localparam int BEATS = (WIDTH + Q - 1) / Q,
  localparam int TOT   = BEATS * Q
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             word_valid,
  output logic             word_ready,
  input  logic [WIDTH-1:0] word,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [Q-1:0]     out_data
);

  logic [TOT-1:0]             sr;
  logic [$clog2(BEATS+1)-1:0] cnt;

  always_comb begin
    out_valid  = (cnt != '0);
    word_ready = !out_valid;
    out_data   = sr[Q-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      sr  <= '0;
    end else if (!out_valid) begin
      if (word_valid) begin
        sr  <= TOT'(word);
        cnt <= BEATS[$bits(cnt)-1:0];
      end
    end else if (out_ready) begin
      sr  <= sr >> Q;
      cnt <= cnt - 1'b1;
    end
  end

  // A beat that is offered stays offered, unchanged, until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
