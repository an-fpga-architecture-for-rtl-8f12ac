// tb_llr_lut: checks both table entries, for the default values (+/-32 at 8 bits) and for
// explicit values at 4 bits.
module tb_llr_lut;
  int checks = 0, failures = 0;
  logic rx;
  logic signed [7:0] l8;
  logic signed [3:0] l4;

  llr_lut                                   u8 (.rx_bit(rx), .llr(l8));
  llr_lut #(.W(4), .LLR0(5), .LLR1(-3))     u4 (.rx_bit(rx), .llr(l4));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s rx=%b got=%0d exp=%0d", what, rx, got, exp);
    end
  endtask

  initial begin
    rx = 0; #1;
    check(int'(l8), 32, "W8 zero");
    check(int'(l4), 5, "W4 zero");
    rx = 1; #1;
    check(int'(l8), -32, "W8 one");
    check(int'(l4), -3, "W4 one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
