// ldpc_pkg: constants, types and edge maps shared by the min-sum LDPC decoder.
//
// The code is the 5 x 7 parity-check matrix H printed as the worked example of the
// decoder (check nodes CN1..CN5 as rows, variable nodes VN1..VN7 as columns). Row r of
// H_ROWS is CN(r+1); bit c of a row, counted from the left, is VN(c+1). Every '1' of H is
// one edge of the Tanner graph. Edges are numbered 0..E-1 in row-major order (CN1 first,
// left to right), and the helper functions below give, for a node and the k-th edge of
// that node, the global edge number. The permutation network, the node units and the
// parity check are all generated from these functions, so a different H only needs a
// new H_ROWS (plus N and M).
//
// Messages are log-likelihood ratios (LLR) in two's complement, LLR_W = 4 bits, matching
// the 4-bit input of the decoder; a positive LLR favours bit 0. Messages saturate
// symmetrically to +/-MSG_MAX so that negation never overflows. A variable node's running
// total needs LLR_W + clog2(DV_MAX+1) bits to hold the channel value plus all its
// incoming check messages without overflow.
//
// MAX_ITER and STAT_THRESH are this design's own choices; the text names the threshold
// rule but gives no number for it or for the iteration limit.
package ldpc_pkg;

  localparam int N = 7;                 // variable nodes (code length)
  localparam int M = 5;                 // check nodes (parity checks)
  localparam bit [0:N-1] H_ROWS [M] = '{
    7'b1110100,
    7'b1101010,
    7'b1011001,
    7'b0001111,
    7'b0010111
  };

  localparam int LLR_W      = 4;                      // input and message width
  localparam int MSG_MAX    = (1 << (LLR_W - 1)) - 1; // +/-7
  localparam int MAX_ITER   = 10;                     // check-node updates per frame
  localparam int STAT_THRESH = 14;                    // |total LLR| marking a node stationary

  function automatic int col_deg(int c);
    int d = 0;
    for (int r = 0; r < M; r++) if (H_ROWS[r][c]) d++;
    return d;
  endfunction

  function automatic int row_deg(int r);
    int d = 0;
    for (int c = 0; c < N; c++) if (H_ROWS[r][c]) d++;
    return d;
  endfunction

  function automatic int max_col_deg();
    int d = 0;
    for (int c = 0; c < N; c++) if (col_deg(c) > d) d = col_deg(c);
    return d;
  endfunction

  function automatic int max_row_deg();
    int d = 0;
    for (int r = 0; r < M; r++) if (row_deg(r) > d) d = row_deg(r);
    return d;
  endfunction

  function automatic int num_edges();
    int e = 0;
    for (int r = 0; r < M; r++) e += row_deg(r);
    return e;
  endfunction

  localparam int DV_MAX = max_col_deg();   // 3 for the H above
  localparam int DC_MAX = max_row_deg();   // 4
  localparam int E      = num_edges();     // 20
  localparam int TOT_W  = LLR_W + $clog2(DV_MAX + 1);
  localparam int ITER_W = $clog2(MAX_ITER + 1);

  // Global number of the edge (r, c), or -1 if H has a zero there.
  function automatic int edge_of(int r, int c);
    int e = 0;
    if (!H_ROWS[r][c]) return -1;
    for (int rr = 0; rr < M; rr++)
      for (int cc = 0; cc < N; cc++) begin
        if (rr == r && cc == c) return e;
        if (H_ROWS[rr][cc]) e++;
      end
    return -1;
  endfunction

  // Edge number of the k-th edge of check node r (counted left to right), or -1.
  function automatic int cn_edge(int r, int k);
    int n = 0;
    for (int c = 0; c < N; c++)
      if (H_ROWS[r][c]) begin
        if (n == k) return edge_of(r, c);
        n++;
      end
    return -1;
  endfunction

  // Edge number of the k-th edge of variable node c (counted top to bottom), or -1.
  function automatic int vn_edge(int c, int k);
    int n = 0;
    for (int r = 0; r < M; r++)
      if (H_ROWS[r][c]) begin
        if (n == k) return edge_of(r, c);
        n++;
      end
    return -1;
  endfunction

  typedef logic signed [LLR_W-1:0] msg_t;   // channel value or edge message
  typedef logic signed [TOT_W-1:0] tot_t;   // a posteriori total of a variable node
  typedef logic [ITER_W-1:0]       iter_t;

endpackage
