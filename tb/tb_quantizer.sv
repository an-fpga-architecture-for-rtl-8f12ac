// tb_quantizer: hard decision and codeword test for the (7,4) example code.
// Part 1 feeds LLRs whose signs spell each of the 16 codewords of the code (from its printed
// generator matrix, rows 1000111, 0100110, 0010101, 0001011), with random magnitudes and
// zeros counted as positive: done must be 1 and the hard word must equal the codeword.
// Part 2 feeds random LLRs: the hard word, each syndrome bit and done are compared with values
// computed from the parity equations C0 = S0+S1+S2+S4, C1 = S0+S1+S3+S5, C2 = S0+S2+S3+S6.
module tb_quantizer;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  localparam int LW = 10;
  logic signed [LW-1:0] ybar [DEF_N];
  logic [DEF_N-1:0] yhat;
  logic [DEF_R-1:0] syn;
  logic done;

  quantizer #(.LW(LW)) dut (.ybar, .yhat, .syndrome(syn), .done);

  // Generator rows as printed, leftmost = column 0.
  localparam logic [0:6] G [4] = '{7'b1000111, 7'b0100110, 7'b0010101, 7'b0001011};

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++) begin
      logic [0:6] cw;
      logic [6:0] expw;
      cw = '0;
      for (int r = 0; r < 4; r++) if (x[r]) cw ^= G[r];
      for (int j = 0; j < 7; j++) begin
        expw[j] = cw[j];
        ybar[j] = cw[j] ? -LW'(int'($urandom_range(1, 300)))
                        : LW'(int'($urandom_range(0, 300)));
      end
      #1;
      check(int'(done), 1, "done on codeword");
      check(int'(yhat), int'(expw), "hard word of codeword");
    end
    for (int t = 0; t < 500; t++) begin
      logic [6:0] b;
      logic [2:0] s;
      for (int j = 0; j < 7; j++) begin
        ybar[j] = LW'(int'($urandom_range(0, 1000)) - 500);
        b[j] = (ybar[j] < 0);
      end
      s[0] = b[0] ^ b[1] ^ b[2] ^ b[4];
      s[1] = b[0] ^ b[1] ^ b[3] ^ b[5];
      s[2] = b[0] ^ b[2] ^ b[3] ^ b[6];
      #1;
      check(int'(yhat), int'(b), "hard word");
      check(int'(syn), int'(s), "syndrome");
      check(int'(done), int'(s == 0), "done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
