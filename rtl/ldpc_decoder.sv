// ldpc_decoder: fully parallel min-sum LDPC decoder with Q-bit input and output buses.
//
// One check_node per row of H and one symbol_node per column are wired together according to
// the ones of H: every one of H is an edge of the Tanner graph and carries a W-bit message in
// each direction. Edges are numbered row by row; each check node of degree d reads the
// symbol-to-check messages of its d edges and drives their check-to-symbol messages, and each
// symbol node of degree d reads the check-to-symbol messages of its d edges and drives the
// next symbol-to-check messages. The symbol-to-check messages are the only decoding state: one
// register of W bits per edge.
//
// Operation. A received hard word Y (N bits) arrives on the Q-bit input bus into the input
// shift register. Loading it initialises every edge register with the channel LLR of its
// symbol's received bit. Then each clock cycle is one whole iteration: check nodes, symbol
// nodes and the quantizer run combinationally from the edge registers, and the new
// symbol-to-check messages are clocked back into them. When the quantizer reports a valid
// codeword, the first M bits of the hard decision are the decoded word. If MAX_ITER
// iterations pass without a valid codeword, the first M bits of the received word are released
// unchanged. The decoded word leaves through the output shift register on the Q-bit bus.
// converged and iterations describe the word in the output shift register: they change when a
// decoded word is loaded into it and hold until the next one is loaded.
//
// Timing, counting clock edges from the one that takes the last input beat (edge 0): edge 1
// loads the word and initialises the messages, iteration k is clocked at edge 1+k, and the
// decoded word enters the output register at edge 2+k after the deciding iteration k, so its
// first beat is offered iterations+2 edges after the last input beat. The next word is taken
// from the input register only after that load; its beats may arrive during decoding.
// The one-iteration-per-cycle schedule, the bus handshakes, the status outputs, MAX_ITER and
// the fixed-point format are this design's choices. Active-low synchronous reset.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int                  N        = DEF_N,
  parameter int                  R        = DEF_R,
  parameter logic [0:R-1][0:N-1] H        = DEF_H,
  parameter int                  Q        = DEF_Q,
  parameter int                  W        = DEF_MSG_W,
  parameter int                  MAX_ITER = DEF_MAX_ITER,
  parameter int                  LLR0     = 2 ** (W - 3),
  parameter int                  LLR1     = -(2 ** (W - 3)),
  localparam int                 M        = N - R,
  localparam int                 ITW      = $clog2(MAX_ITER + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [Q-1:0]   in_data,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [Q-1:0]   out_data,
  output logic           converged,
  output logic [ITW-1:0] iterations
);

  // ---------------------------------------------------------------- graph bookkeeping
  // Elaboration-time helpers; rows of H are packed vectors, so row counts use $countones.
  function automatic int check_deg(input int i);
    return $countones(H[i]);
  endfunction

  function automatic int num_edges();
    int c = 0;
    for (int i = 0; i < R; i++) c += check_deg(i);
    return c;
  endfunction

  function automatic int symbol_deg(input int j);
    int c = 0;
    for (int i = 0; i < R; i++) c += int'(H[i][j]);
    return c;
  endfunction

  function automatic int max_symbol_deg();
    int d = 0;
    for (int j = 0; j < N; j++) begin
      int dj = symbol_deg(j);
      if (dj > d) d = dj;
    end
    return d;
  endfunction

  // Number of edges in the rows above row i.
  function automatic int row_offset(input int i);
    int c = 0;
    for (int a = 0; a < i; a++) c += check_deg(a);
    return c;
  endfunction

  // Index of the edge (i, j), edges numbered row by row. Columns 0..j-1 of a row are its
  // j leftmost (most significant) bits.
  function automatic int edge_index(input int i, input int j);
    logic [0:N-1] row = H[i];
    return row_offset(i) + ((j == 0) ? 0 : $countones(row >> (N - j)));
  endfunction

  // Edge of the k-th one in row i (check node i's k-th port).
  function automatic int check_edge(input int i, input int k);
    int e = row_offset(i);
    int c = 0;
    for (int j = 0; j < N; j++)
      if (H[i][j]) begin
        if (c == k) return e;
        c++;
        e++;
      end
    return -1;
  endfunction

  // Edge of the k-th one in column j (symbol node j's k-th port).
  function automatic int symbol_edge(input int j, input int k);
    int c = 0;
    for (int i = 0; i < R; i++)
      if (H[i][j]) begin
        if (c == k) return edge_index(i, j);
        c++;
      end
    return -1;
  endfunction

  localparam int E  = num_edges();
  localparam int LW = W + $clog2(max_symbol_deg() + 1);

  // ---------------------------------------------------------------- control
  typedef enum logic [1:0] {S_IDLE, S_ITER, S_OUT} state_t;
  state_t state;

  logic                rx_valid, rx_ready;
  logic [N-1:0]        rx_word;     // from the input shift register
  logic [N-1:0]        rx_reg;      // received word being decoded
  logic [M-1:0]        result;
  logic                res_ready;
  logic [ITW-1:0]      iter;
  logic                res_conv;    // status of the word in `result`
  logic [ITW-1:0]      res_iters;

  logic signed [W-1:0]  v2c      [E];  // symbol-to-check messages (registers)
  logic signed [W-1:0]  v2c_next [E];
  logic signed [W-1:0]  v2c_init [E];  // channel LLR of each edge's symbol
  logic signed [W-1:0]  c2v      [E];  // check-to-symbol messages
  logic signed [W-1:0]  llr_in   [N];  // channel LLRs of the incoming word
  logic signed [LW-1:0] ybar     [N];
  logic [N-1:0]         yhat;
  logic [R-1:0]         syndrome;
  logic                 done;

  bus_deserializer #(.Q(Q), .WIDTH(N)) u_in (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .word_valid (rx_valid),
    .word_ready (rx_ready),
    .word       (rx_word)
  );

  always_comb rx_ready = (state == S_IDLE);

  for (genvar j = 0; j < N; j++) begin : g_llr
    llr_lut #(.W(W), .LLR0(LLR0), .LLR1(LLR1)) u_llr (
      .rx_bit (rx_word[j]),
      .llr    (llr_in[j])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      iter       <= '0;
      rx_reg     <= '0;
      result     <= '0;
      converged  <= 1'b0;
      iterations <= '0;
      res_conv   <= 1'b0;
      res_iters  <= '0;
      for (int e = 0; e < E; e++) v2c[e] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (rx_valid) begin
          rx_reg <= rx_word;
          iter   <= '0;
          v2c    <= v2c_init;
          state  <= S_ITER;
        end
        S_ITER: begin
          v2c  <= v2c_next;
          iter <= iter + 1'b1;
          if (done) begin
            result     <= yhat[M-1:0];
            res_conv   <= 1'b1;
            res_iters  <= iter + 1'b1;
            state      <= S_OUT;
          end else if (iter == ITW'(MAX_ITER - 1)) begin
            result     <= rx_reg[M-1:0];
            res_conv   <= 1'b0;
            res_iters  <= iter + 1'b1;
            state      <= S_OUT;
          end
        end
        S_OUT: if (res_ready) begin
          converged  <= res_conv;
          iterations <= res_iters;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- message passing
  for (genvar i = 0; i < R; i++) begin : g_check
    localparam int D = check_deg(i);
    logic signed [W-1:0] cx [D];
    logic signed [W-1:0] cy [D];
    for (genvar k = 0; k < D; k++) begin : g_port
      assign cx[k] = v2c[check_edge(i, k)];
      assign c2v[check_edge(i, k)] = cy[k];
    end
    check_node #(.DEG(D), .W(W)) u_cn (.x(cx), .y(cy));
  end

  for (genvar j = 0; j < N; j++) begin : g_symbol
    localparam int D  = symbol_deg(j);
    localparam int SW = W + $clog2(D + 1);
    logic signed [W-1:0]  sx [D];
    logic signed [W-1:0]  sy [D];
    logic signed [SW-1:0] sbar;
    for (genvar k = 0; k < D; k++) begin : g_port
      assign sx[k] = c2v[symbol_edge(j, k)];
      assign v2c_next[symbol_edge(j, k)] = sy[k];
      assign v2c_init[symbol_edge(j, k)] = llr_in[j];
    end
    symbol_node #(.DEG(D), .W(W), .LLR0(LLR0), .LLR1(LLR1)) u_sn (
      .rx_bit (rx_reg[j]),
      .x      (sx),
      .y      (sy),
      .ybar   (sbar)
    );
    assign ybar[j] = LW'(sbar);
  end

  quantizer #(.N(N), .R(R), .H(H), .LW(LW)) u_q (
    .ybar, .yhat, .syndrome, .done
  );

  bus_serializer #(.Q(Q), .WIDTH(M)) u_out (
    .clk, .rst_n,
    .word_valid (state == S_OUT),
    .word_ready (res_ready),
    .word       (result),
    .out_valid, .out_ready, .out_data
  );

endmodule
