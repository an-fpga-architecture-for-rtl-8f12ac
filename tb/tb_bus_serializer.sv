// tb_bus_serializer: a 7-bit word over a 3-bit bus (3 beats, the last one padded with zeros).
// Random back-pressure on the output. Checks every beat's value and order, the zero padding,
// the beat count per word and that word_ready returns only after the last beat.
module tb_bus_serializer;
  int checks = 0, failures = 0;
  localparam int Q = 3, WIDTH = 7, BEATS = 3;
  logic clk = 0, rst_n = 0;
  logic word_valid, word_ready, out_valid, out_ready;
  logic [WIDTH-1:0] word;
  logic [Q-1:0] out_data;

  bus_serializer #(.Q(Q), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    word_valid = 0; word = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [8:0] w;
      w = {2'b00, 7'($urandom)};
      @(posedge clk); #1;
      check(int'(word_ready), 1, "ready when empty");
      word_valid = 1;
      word = w[6:0];
      @(posedge clk); #1;
      word_valid = 0;
      word = 7'($urandom);
      for (int b = 0; b < BEATS; b++) begin
        check(int'(out_valid), 1, "beat offered");
        check(int'(word_ready), 0, "busy while beats remain");
        check(int'(out_data), int'(w[b*Q +: Q]), "beat value");
        while ($urandom_range(0, 2) == 0) begin
          out_ready = 0;
          @(posedge clk); #1;
          check(int'(out_data), int'(w[b*Q +: Q]), "beat held under back-pressure");
        end
        out_ready = 1;
        @(posedge clk); #1;
        out_ready = 0;
      end
      check(int'(out_valid), 0, "no extra beat");
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
