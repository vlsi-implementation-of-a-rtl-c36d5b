// min_sum: fully parallel, threshold-controlled min-sum LDPC decoder (top level).
//
// The decoder corrects a noisy received word of the 7-bit code defined by the 5 x 7
// parity-check matrix in ldpc_pkg. Channel LLRs enter serially, 4 bits per clock, and
// are gathered by channel_in; the frame being decoded sits in intrinsic_mem. Seven
// variable-node units (vnfu) and five check-node units (bnfu), one per column and per
// row of H, exchange messages through perm_net, which routes them along the edges of the
// Tanner graph and holds one register per edge and direction. Each iteration is two
// clocks: a variable-node pass, then a check-node pass (decoder_ctrl).
//
// Threshold control: after every variable-node pass the stationary_unit marks nodes
// whose |a posteriori LLR| has reached the threshold. Such a node keeps its hard
// decision for the rest of the frame, stops computing new messages, and is left out of
// the check nodes' minimum search, so the following iterations work on a reduced H.
// decision_unit forms the hard decision and its syndrome; decoding stops as soon as the
// syndrome is zero or after MAX_ITER check passes. codeword_out then sends the 7
// decoded bits serially on dout, VN1 first, while the next frame can already be loaded.
//
// Ports: din/din_valid/din_ready (input, valid/ready), dout/dout_valid (output),
// word_ok and word_iters (status of the word being sent: parity satisfied, check passes
// used), busy, stat_mask (stationary nodes of the frame in progress), syndrome (parity
// checks failed by the latest estimate) and app_llr (a posteriori LLRs of the variable
// nodes); the last three are for observation.
//
// The clk, din(3:0) and single output pin, the node units, permutation network,
// intrinsic memory, stationary and decision units follow the decoder's description;
// the handshakes, status ports, reset, iteration schedule and all numeric choices other
// than the code and the 4-bit input width are this design's own.
module min_sum
  import ldpc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [LLR_W-1:0] din,
  input  logic         din_valid,
  output logic         din_ready,
  output logic         dout,
  output logic         dout_valid,
  output logic         word_ok,
  output iter_t        word_iters,
  output logic         busy,
  output logic [N-1:0] stat_mask,
  output logic [M-1:0] syndrome,
  output tot_t         app_llr [N]
);

  // control
  logic take, v_en, c_en, word_valid, frame_rdy, ok, out_idle;
  // data
  msg_t frame   [N];
  msg_t lch     [N];
  tot_t total   [N];
  logic stat    [N];
  logic stat_bit[N];
  msg_t vn_v2c  [N][DV_MAX];
  msg_t vn_c2v  [N][DV_MAX];
  msg_t cn_v2c  [M][DC_MAX];
  logic cn_stat [M][DC_MAX];
  msg_t cn_c2v  [M][DC_MAX];
  logic [N-1:0] hard;

  channel_in u_in (
    .clk, .rst_n, .din(msg_t'(din)), .din_valid, .din_ready,
    .take, .frame_rdy, .frame
  );

  intrinsic_mem u_imem (
    .clk, .rst_n, .load(take), .wdata(frame), .rdata(lch)
  );

  for (genvar c = 0; c < N; c++) begin : g_vnfu
    localparam int D = col_deg(c);
    msg_t c2v_l [D];
    msg_t v2c_l [D];
    for (genvar k = 0; k < D; k++) begin : g_k
      assign c2v_l[k]     = vn_c2v[c][k];
      assign vn_v2c[c][k] = v2c_l[k];
    end
    for (genvar k = D; k < DV_MAX; k++) begin : g_pad
      assign vn_v2c[c][k] = '0;
    end
    vnfu #(.DEG(D)) u_vnfu (
      .lch(lch[c]), .c2v(c2v_l), .freeze(stat[c]), .frz_bit(stat_bit[c]),
      .total(total[c]), .v2c(v2c_l)
    );
  end

  perm_net u_perm (
    .clk, .rst_n, .clear(take), .v_load(v_en), .c_load(c_en),
    .vn_v2c, .vn_stat(stat), .cn_c2v, .cn_v2c, .cn_stat, .vn_c2v
  );

  for (genvar r = 0; r < M; r++) begin : g_bnfu
    localparam int D = row_deg(r);
    msg_t v2c_l  [D];
    logic stat_l [D];
    msg_t c2v_l  [D];
    for (genvar k = 0; k < D; k++) begin : g_k
      assign v2c_l[k]     = cn_v2c[r][k];
      assign stat_l[k]    = cn_stat[r][k];
      assign cn_c2v[r][k] = c2v_l[k];
    end
    for (genvar k = D; k < DC_MAX; k++) begin : g_pad
      assign cn_c2v[r][k] = '0;
    end
    bnfu #(.DEG(D)) u_bnfu (.v2c(v2c_l), .stat(stat_l), .c2v(c2v_l));
  end

  stationary_unit u_stat (
    .clk, .rst_n, .clear(take), .update(v_en), .total, .stat, .stat_bit
  );

  decision_unit u_dec (
    .clk, .rst_n, .clear(take), .update(v_en), .total, .stat, .stat_bit,
    .hard, .syndrome, .ok
  );

  decoder_ctrl u_ctrl (
    .clk, .rst_n, .frame_rdy, .ok, .out_idle, .take, .v_en, .c_en, .word_valid,
    .busy, .iters(word_iters), .converged(word_ok)
  );

  codeword_out u_out (
    .clk, .rst_n, .word_valid, .word(hard), .idle(out_idle), .dout, .dout_valid
  );

  always_comb
    for (int c = 0; c < N; c++) stat_mask[c] = stat[c];

  assign app_llr = total;

endmodule
