// ldpc_ref_pkg: behavioural reference models used by the testbenches.
//
// Written independently of the RTL, in the "message matrix" style: messages are kept in full
// R x N integer matrices indexed by (check, symbol), only entries where H is 1 being used.
// H is passed as a flat bit array, entry (i, j) at index i*n + j.
//   encode       : systematic encoding with G = [I | P^T] derived from H = [P | I]
//   syndrome_ok  : true when the hard word satisfies every parity check
//   minsum_decode: min-sum decoding (sign-min check update, sum-minus-own symbol update,
//                  saturation of messages to +/-(2^(w-1)-1), hard decision 1 when the total
//                  LLR is negative), stopping at the first valid codeword or after max_iter
//                  iterations, in which case the received bits are returned unchanged.
package ldpc_ref_pkg;

  function automatic int satw(input int v, input int w);
    int mx = (1 << (w - 1)) - 1;
    if (v > mx) return mx;
    if (v < -mx) return -mx;
    return v;
  endfunction

  function automatic void encode(input int n, input int r, input bit h[], input bit x[],
                                 output bit y[]);
    int m = n - r;
    y = new[n];
    for (int k = 0; k < m; k++) y[k] = x[k];
    for (int i = 0; i < r; i++) begin
      bit p = 0;
      for (int j = 0; j < m; j++) p ^= h[i*n + j] & x[j];
      y[m + i] = p;
    end
  endfunction

  function automatic bit syndrome_ok(input int n, input int r, input bit h[], input bit y[]);
    for (int i = 0; i < r; i++) begin
      bit p = 0;
      for (int j = 0; j < n; j++) p ^= h[i*n + j] & y[j];
      if (p) return 0;
    end
    return 1;
  endfunction

  function automatic void minsum_decode(
    input  int n, input int r, input bit h[], input int w, input int max_iter,
    input  int llr0, input int llr1, input bit rx[],
    output bit dec[], output bit conv, output int iters);
    int m = n - r;
    int mx = (1 << (w - 1)) - 1;
    int v2c[] = new[r*n];
    int c2v[] = new[r*n];
    int llr[] = new[n];
    bit yh[]  = new[n];
    dec = new[m];
    for (int j = 0; j < n; j++) llr[j] = rx[j] ? llr1 : llr0;
    for (int i = 0; i < r; i++)
      for (int j = 0; j < n; j++) v2c[i*n + j] = llr[j];
    for (int it = 1; it <= max_iter; it++) begin
      // check nodes
      for (int i = 0; i < r; i++)
        for (int j = 0; j < n; j++) if (h[i*n + j]) begin
          int mn = mx;
          bit s = 0;
          for (int jj = 0; jj < n; jj++) if (h[i*n + jj] && jj != j) begin
            int v = v2c[i*n + jj];
            int a = (v < 0) ? -v : v;
            if (a > mx) a = mx;
            if (a < mn) mn = a;
            s ^= (v < 0);
          end
          c2v[i*n + j] = s ? -mn : mn;
        end
      // symbol nodes and hard decision
      for (int j = 0; j < n; j++) begin
        int tot = llr[j];
        for (int i = 0; i < r; i++) if (h[i*n + j]) tot += c2v[i*n + j];
        for (int i = 0; i < r; i++) if (h[i*n + j]) v2c[i*n + j] = satw(tot - c2v[i*n + j], w);
        yh[j] = (tot < 0);
      end
      if (syndrome_ok(n, r, h, yh)) begin
        for (int k = 0; k < m; k++) dec[k] = yh[k];
        conv = 1;
        iters = it;
        return;
      end
    end
    for (int k = 0; k < m; k++) dec[k] = rx[k];
    conv = 0;
    iters = max_iter;
  endfunction

endpackage
