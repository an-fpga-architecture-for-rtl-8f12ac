// bus_deserializer: input shift register from a Q-bit bus to a WIDTH-bit word.
//
// Words are far wider than the device's data bus, so a word arrives as BEATS = ceil(WIDTH/Q)
// beats. Beat b carries word bits [b*Q +: Q] (least significant beat first); unused bits of
// the last beat are ignored. Each accepted beat enters at the top of a shift register and
// moves the earlier beats down by Q bits, so after BEATS beats beat 0 sits at bit 0.
//
// Interface: both sides use valid/ready handshakes; a transfer happens on a rising clock edge
// where valid and ready are both high. in_ready is high while the word is incomplete. Once
// the last beat is in, word_valid rises on the next cycle and stays high, with word stable,
// until word_ready takes it; the register is then empty again. Reset is active-low and
// synchronous. Bus width, bit order and handshake are this design's choices.
module bus_deserializer #(
  parameter int Q     = 4,
  parameter int WIDTH = 7,
  localparam int BEATS = (WIDTH + Q - 1) / Q,
  localparam int TOT   = BEATS * Q
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [Q-1:0]     in_data,
  output logic             word_valid,
  input  logic             word_ready,
  output logic [WIDTH-1:0] word
);

  logic [TOT-1:0]               sr;
  logic [$clog2(BEATS+1)-1:0]   cnt;

  always_comb begin
    word_valid = (cnt == BEATS[$bits(cnt)-1:0]);
    in_ready   = !word_valid;
    word       = sr[WIDTH-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      sr  <= '0;
    end else if (word_valid) begin
      if (word_ready) cnt <= '0;
    end else if (in_valid) begin
      sr  <= TOT'({in_data, sr} >> Q);
      cnt <= cnt + 1'b1;
    end
  end

endmodule
