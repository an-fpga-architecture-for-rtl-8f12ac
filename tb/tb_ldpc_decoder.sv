// tb_ldpc_decoder: the decoder of the (7,4) example code at its default settings (4-bit bus,
// 8-bit messages, at most 8 iterations). Every one of the 128 possible received words is
// decoded, in random order and repeated, and compared with the behavioural min-sum model of
// ldpc_ref_pkg: decoded word, converged flag and iteration count. The latency is checked too:
// the decoded word's first beat is offered iterations + 2 clock edges after the edge that takes
// the last input beat. The run must include words that are correct as received, words that are
// corrected, and words released unchanged at the iteration limit.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int Q = DEF_Q, N = DEF_N, R = DEF_R, M = N - R;
  localparam int W = DEF_MSG_W, MAXIT = DEF_MAX_ITER;
  localparam int ITW = $clog2(MAXIT + 1);
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, converged;
  logic [Q-1:0] in_data, out_data;
  logic [ITW-1:0] iterations;
  int cycle = 0;
  int n_ok = 0, n_corrected = 0, n_limit = 0;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  bit h [];

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  int last_in_cycle;

  // Drive at the falling edge, transfer at the rising edge.
  task automatic send(input logic [N-1:0] y);
    logic [7:0] w;
    w = 8'(y);
    for (int b = 0; b < 2; b++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = w[b*Q +: Q];
      while (!in_ready) @(negedge clk);
      last_in_cycle = cycle + 1;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic recv(output logic [M-1:0] x, output int first_cycle);
    first_cycle = -1;
    forever begin
      @(negedge clk);
      out_ready = 1'($urandom);
      if (out_valid && first_cycle < 0) first_cycle = cycle;
      if (out_valid && out_ready) break;
    end
    x = out_data[M-1:0];
    @(posedge clk);
    #1;
    out_ready = 0;
  endtask

  initial begin
    in_valid = 0; in_data = '0; out_ready = 0;
    h = new[R*N];
    for (int i = 0; i < R; i++) for (int j = 0; j < N; j++) h[i*N + j] = DEF_H[i][j];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3 * 128; t++) begin
      logic [N-1:0] y;
      logic [M-1:0] x;
      bit rx [];
      bit dec [];
      bit conv;
      int its, fc;
      y = (t < 128) ? N'(t) : N'($urandom);
      rx = new[N];
      for (int j = 0; j < N; j++) rx[j] = y[j];
      minsum_decode(N, R, h, W, MAXIT, 1 << (W - 3), -(1 << (W - 3)), rx, dec, conv, its);
      fork
        send(y);
        recv(x, fc);
      join
      for (int k = 0; k < M; k++) check(int'(x[k]), int'(dec[k]), "decoded bit");
      check(int'(converged), int'(conv), "converged flag");
      check(int'(iterations), its, "iteration count");
      check(fc - last_in_cycle, its + 2, "latency");
      if (!conv) n_limit++;
      else if (syndrome_ok(N, R, h, rx)) n_ok++;
      else n_corrected++;
    end
    $display("received valid: %0d, corrected: %0d, released at limit: %0d",
             n_ok, n_corrected, n_limit);
    checks++;
    if (n_ok == 0 || n_corrected == 0 || n_limit == 0) begin
      failures++;
      $display("FAIL a decoding outcome never occurred");
    end
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
