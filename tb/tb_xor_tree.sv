// tb_xor_tree: exhaustive test of the modulo-2 sum unit.
// Three instances: a dense mask, a one-hot mask (identity column of G, a wire) and the
// first row of the (7,4) example code's H. Every 7-bit input is applied and each output is
// compared with a parity computed bit by bit in the testbench.
module tb_xor_tree;
  int checks = 0, failures = 0;
  logic [6:0] in;
  logic o_dense, o_hot, o_row;
  localparam logic [6:0] M_DENSE = 7'b1011011;
  localparam logic [6:0] M_HOT   = 7'b0000100;
  localparam logic [6:0] M_ROW   = 7'b0010111;   // S0, S1, S2, S4

  xor_tree #(.WIDTH(7), .MASK(M_DENSE)) u_dense (.in, .out(o_dense));
  xor_tree #(.WIDTH(7), .MASK(M_HOT))   u_hot   (.in, .out(o_hot));
  xor_tree #(.WIDTH(7), .MASK(M_ROW))   u_row   (.in, .out(o_row));

  function automatic bit par(input logic [6:0] v, input logic [6:0] m);
    bit p = 0;
    for (int k = 0; k < 7; k++) if (m[k]) p = p ^ v[k];
    return p;
  endfunction

  task automatic check(input bit got, input bit exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%b got=%b exp=%b", what, in, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 128; v++) begin
      in = 7'(v);
      #1;
      check(o_dense, par(in, M_DENSE), "dense");
      check(o_hot, in[2], "one-hot");
      check(o_row, in[0] ^ in[1] ^ in[2] ^ in[4], "H row 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
