// tb_ldpc_codec_top: end-to-end test of the codec at its default settings ((7,4) example code,
// 4-bit buses, 8-bit messages, at most 8 iterations), with no parameter overrides.
// Random source words go through the encoder; each codeword is checked against the behavioural
// encoder and must satisfy every parity check. It then crosses a binary symmetric "channel"
// that flips 0, 1 or 2 random bits, and goes through the decoder, whose decoded word,
// converged flag and iteration count are checked against the behavioural min-sum decoder.
// All four buses run concurrently with random gaps and random back-pressure.
// Mechanisms counted, each required at least once: multi-beat input and output words, output
// back-pressure stalls on both halves, the decoder refusing input while it decodes, the
// encoder taking a new word while still sending the previous codeword, words valid as received,
// words corrected by iteration, and words released unchanged at the iteration limit.
module tb_ldpc_codec_top;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  localparam int Q = DEF_Q, N = DEF_N, R = DEF_R, M = N - R;
  localparam int W = DEF_MSG_W, MAXIT = DEF_MAX_ITER;
  localparam int ITW = $clog2(MAXIT + 1);
  localparam int NWORDS = 400;
  localparam int MAX_ERR = 2;                    // bits flipped per word: 0 to MAX_ERR
  localparam int DEC_READY_PCT = 67;             // chance that the decoder output is ready
  localparam int IN_BEATS  = (N + Q - 1) / Q;    // beats of a codeword
  localparam int SRC_BEATS = (M + Q - 1) / Q;    // beats of a source word

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic enc_in_valid, enc_in_ready, enc_out_valid, enc_out_ready;
  logic dec_in_valid, dec_in_ready, dec_out_valid, dec_out_ready;
  logic [Q-1:0] enc_in_data, enc_out_data, dec_in_data, dec_out_data;
  logic dec_converged;
  logic [ITW-1:0] dec_iterations;

  ldpc_codec_top dut (.*);

  always #5 clk = ~clk;

  bit h [];
  logic [M-1:0] src_q [$];          // source words sent to the encoder
  logic [N-1:0] cw_q  [$];          // codewords from the encoder
  logic [N-1:0] rx_q  [$];          // corrupted words sent to the decoder
  logic [M-1:0] srcd_q [$];         // source words matching rx_q

  int n_enc_stall = 0, n_dec_stall = 0, n_dec_busy = 0, n_enc_overlap = 0;
  int n_ok = 0, n_corrected = 0, n_limit = 0, n_recovered = 0;
  int n_multibeat_in = 0, n_multibeat_out = 0;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // mechanism counters, sampled at the falling edge
  always @(negedge clk) if (rst_n) begin
    if (enc_out_valid && !enc_out_ready) n_enc_stall++;
    if (dec_out_valid && !dec_out_ready) n_dec_stall++;
    if (dec_in_valid && !dec_in_ready) n_dec_busy++;
    if (enc_in_valid && enc_in_ready && enc_out_valid) n_enc_overlap++;
  end

  // encoder source
  initial begin : enc_src
    enc_in_valid = 0; enc_in_data = '0;
    wait (rst_n);
    for (int t = 0; t < NWORDS; t++) begin
      logic [M-1:0] x;
      for (int k = 0; k < M; k++) x[k] = 1'($urandom);
      src_q.push_back(x);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      for (int b = 0; b < SRC_BEATS; b++) begin
        logic [SRC_BEATS*Q-1:0] xw;
        xw = $bits(xw)'(x);
        @(negedge clk);
        enc_in_valid = 1;
        enc_in_data  = xw[b*Q +: Q];
        while (!enc_in_ready) @(negedge clk);
      end
      @(negedge clk);
      enc_in_valid = 0;
    end
  end

  // encoder sink: collects codewords, checks them
  initial begin : enc_sink
    enc_out_ready = 0;
    wait (rst_n);
    for (int t = 0; t < NWORDS; t++) begin
      logic [IN_BEATS*Q-1:0] acc;
      bit xb [], yb [], cb [];
      logic [M-1:0] x;
      logic [N-1:0] y;
      for (int b = 0; b < IN_BEATS; b++) begin
        forever begin
          @(negedge clk);
          enc_out_ready = ($urandom_range(0, 3) != 0);
          if (enc_out_valid && enc_out_ready) break;
        end
        acc[b*Q +: Q] = enc_out_data;
      end
      n_multibeat_out++;
      @(posedge clk); #1 enc_out_ready = 0;
      y = acc[N-1:0];
      x = src_q.pop_front();
      xb = new[M];
      for (int k = 0; k < M; k++) xb[k] = x[k];
      encode(N, R, h, xb, cb);
      yb = new[N];
      for (int j = 0; j < N; j++) begin
        yb[j] = y[j];
        check(int'(y[j]), int'(cb[j]), "codeword bit");
      end
      check(int'(syndrome_ok(N, R, h, yb)), 1, "codeword satisfies H");
      cw_q.push_back(y);
      srcd_q.push_back(x);
    end
  end

  // channel and decoder source
  initial begin : dec_src
    dec_in_valid = 0; dec_in_data = '0;
    wait (rst_n);
    for (int t = 0; t < NWORDS; t++) begin
      logic [N-1:0] y, e;
      logic [IN_BEATS*Q-1:0] w;
      int nerr;
      wait (cw_q.size() > 0);
      y = cw_q.pop_front();
      e = '0;
      nerr = $urandom_range(0, MAX_ERR);
      for (int k = 0; k < nerr; k++) e[$urandom_range(0, N - 1)] = 1'b1;
      y ^= e;
      rx_q.push_back(y);
      w = $bits(w)'(y);
      for (int b = 0; b < IN_BEATS; b++) begin
        @(negedge clk);
        dec_in_valid = 1;
        dec_in_data  = w[b*Q +: Q];
        while (!dec_in_ready) @(negedge clk);
      end
      n_multibeat_in++;
      @(negedge clk);
      dec_in_valid = 0;
    end
  end

  // decoder sink: checks decoded words
  initial begin : dec_sink
    h = new[R*N];
    for (int i = 0; i < R; i++) for (int j = 0; j < N; j++) h[i*N + j] = DEF_H[i][j];
    dec_out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NWORDS; t++) begin
      logic [N-1:0] y;
      logic [M-1:0] x, xs;
      logic [SRC_BEATS*Q-1:0] xo;
      bit rx [], dec [];
      bit conv;
      int its;
      forever begin
        @(negedge clk);
        dec_out_ready = ($urandom_range(0, 99) < DEC_READY_PCT);
        if (dec_out_valid && dec_out_ready) break;
      end
      for (int b = 0; b < SRC_BEATS; b++) begin
        if (b > 0) forever begin
          @(negedge clk);
          dec_out_ready = ($urandom_range(0, 99) < DEC_READY_PCT);
          if (dec_out_valid && dec_out_ready) break;
        end
        xo[b*Q +: Q] = dec_out_data;
      end
      x  = xo[M-1:0];
      y  = rx_q.pop_front();
      xs = srcd_q.pop_front();
      rx = new[N];
      for (int j = 0; j < N; j++) rx[j] = y[j];
      minsum_decode(N, R, h, W, MAXIT, 1 << (W - 3), -(1 << (W - 3)), rx, dec, conv, its);
      for (int k = 0; k < M; k++) check(int'(x[k]), int'(dec[k]), "decoded bit");
      check(int'(dec_converged), int'(conv), "converged flag");
      check(int'(dec_iterations), its, "iteration count");
      if (!conv) n_limit++;
      else if (syndrome_ok(N, R, h, rx)) n_ok++;
      else n_corrected++;
      if (x == xs) n_recovered++;
      @(posedge clk); #1 dec_out_ready = 0;
    end
    $display("words %0d: valid as received %0d, corrected %0d, released at limit %0d, source recovered %0d",
             NWORDS, n_ok, n_corrected, n_limit, n_recovered);
    $display("multi-beat in %0d out %0d, enc stalls %0d, dec stalls %0d, dec busy %0d, enc overlap %0d",
             n_multibeat_in, n_multibeat_out, n_enc_stall, n_dec_stall, n_dec_busy, n_enc_overlap);
    begin
      int mech [9];
      mech = '{n_ok, n_corrected, n_limit, n_enc_stall, n_dec_stall, n_dec_busy,
               n_enc_overlap, n_multibeat_in, n_multibeat_out};
      foreach (mech[i]) begin
        checks++;
        if (mech[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
