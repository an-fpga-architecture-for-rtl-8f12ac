// tb_ldpc_encoder: the encoder of the (7,4) example code on a 4-bit bus.
// Expected codewords come from the code's printed generator matrix (rows 1000111, 0100110,
// 0010101, 0001011, leftmost = column 0); the worked example X = [1 0 1 1] must give
// Y = [1 0 1 1 0 0 1]. Phase 1 sends each of the 16 source words alone and checks the
// codeword and the latency: the first output beat is offered 1 cycle after the clock edge
// that takes the last input beat. Phase 2 streams 300 random words with random input gaps and
// random output back-pressure, checking every codeword in order.
module tb_ldpc_encoder;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  localparam int Q = DEF_Q, M = 4, N = 7;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [Q-1:0] in_data, out_data;
  int cycle = 0;

  ldpc_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  localparam logic [0:6] G [4] = '{7'b1000111, 7'b0100110, 7'b0010101, 7'b0001011};

  function automatic logic [6:0] enc(input logic [3:0] x);
    logic [0:6] cw;
    logic [6:0] y;
    cw = '0;
    for (int r = 0; r < 4; r++) if (x[r]) cw ^= G[r];
    for (int j = 0; j < 7; j++) y[j] = cw[j];
    return y;
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  // Stimulus is driven and outputs are sampled at the falling edge; transfers happen at the
  // rising edge. last_in_cycle is the index of the rising edge that takes the last input beat;
  // first_cycle is the index of the first rising edge at which a beat is offered.
  int last_in_cycle;

  task automatic send(input logic [3:0] x, input bit gaps);
    if (gaps) repeat ($urandom_range(0, 3)) @(negedge clk);
    @(negedge clk);
    in_valid = 1;
    in_data  = x;
    while (!in_ready) @(negedge clk);
    last_in_cycle = cycle + 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic recv(output logic [6:0] y, output int first_cycle, input bit bp);
    logic [7:0] acc;
    first_cycle = -1;
    for (int b = 0; b < 2; b++) begin
      forever begin
        @(negedge clk);
        out_ready = bp ? 1'($urandom) : 1'b1;
        if (out_valid && first_cycle < 0) first_cycle = cycle;
        if (out_valid && out_ready) break;
      end
      acc[b*Q +: Q] = out_data;
    end
    @(posedge clk);
    #1;
    out_ready = 0;
    y = acc[6:0];
  endtask

  logic [3:0] q [$];

  initial begin
    in_valid = 0; in_data = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // worked example from the code's description
    check(int'(enc(4'b1101)), int'(7'b1001101), "reference: X=[1 0 1 1] -> Y=[1 0 1 1 0 0 1]");
    // phase 1: one word at a time, latency
    for (int x = 0; x < 16; x++) begin
      logic [6:0] y;
      int fc;
      fork
        send(4'(x), 0);
        recv(y, fc, 0);
      join
      check(int'(y), int'(enc(4'(x))), "codeword");
      check(fc - last_in_cycle, 1, "latency (cycles from last input beat to first output beat)");
    end
    // phase 2: streaming with gaps and back-pressure
    fork
      for (int t = 0; t < 300; t++) begin
        logic [3:0] x;
        x = 4'($urandom);
        q.push_back(x);
        send(x, 1);
      end
      for (int t = 0; t < 300; t++) begin
        logic [6:0] y;
        logic [3:0] x;
        int fc;
        recv(y, fc, 1);
        x = q.pop_front();
        check(int'(y), int'(enc(x)), "streamed codeword");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
