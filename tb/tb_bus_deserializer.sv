// tb_bus_deserializer: a 7-bit word over a 3-bit bus (3 beats, the last one padded).
// Random gaps on the input and random delays before the word is taken. Checks the assembled
// word, that word_valid rises exactly one cycle after the last beat, that in_ready is low and
// the word held while it waits, and that padding bits are ignored.
module tb_bus_deserializer;
  int checks = 0, failures = 0;
  localparam int Q = 3, WIDTH = 7, BEATS = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, word_valid, word_ready;
  logic [Q-1:0] in_data;
  logic [WIDTH-1:0] word;

  bus_deserializer #(.Q(Q), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    in_valid = 0; in_data = '0; word_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [8:0] w;
      w = 9'($urandom);
      for (int b = 0; b < BEATS; b++) begin
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1;
        check(int'(in_ready), 1, "in_ready while filling");
        check(int'(word_valid), 0, "no word before last beat");
        in_valid = 1;
        in_data  = w[b*Q +: Q];
        @(posedge clk);
        #1;
        in_valid = 0;
        in_data  = 3'($urandom);
      end
      check(int'(word_valid), 1, "word_valid one cycle after last beat");
      check(int'(word), int'(w[WIDTH-1:0]), "word");
      in_valid = 1;   // offered beats must be refused while full
      repeat ($urandom_range(1, 3)) begin
        @(posedge clk); #1;
        check(int'(in_ready), 0, "in_ready low while full");
        check(int'(word), int'(w[WIDTH-1:0]), "word held");
      end
      in_valid = 0;
      word_ready = 1;
      @(posedge clk); #1;
      word_ready = 0;
      check(int'(word_valid), 0, "word taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
