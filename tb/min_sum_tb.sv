// min_sum_tb: end-to-end test of the LDPC decoder at its default parameters.
//
// Code words of H (found by exhaustive search over all 128 words) are sent over a BPSK
// channel with additive noise of varying strength, quantised to 4-bit LLRs and fed to
// the decoder serially with random gaps. A behavioural model of the threshold-controlled
// min-sum algorithm, written here as plain loops over H, predicts for each frame the
// decoded word, the number of check passes and the convergence flag; the serial output,
// word_iters and word_ok are compared with it, and the clocks from taking a frame to
// handing its word to the output are checked against 2*(iterations+1)+1, plus any
// clocks the finished word waits for the output stage.
//
// Each mechanism of the decoder is counted and must occur at least once: early stop on
// a zero syndrome, stop at the iteration limit, a node becoming stationary, a check pass
// with stationary edges, input back-pressure, the output stage holding back a finished
// word, clipping of -8, and channel errors corrected by decoding.
module min_sum_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  localparam int FRAMES = 3000;

  logic clk = 0, rst_n = 0, din_valid = 0;
  logic [LLR_W-1:0] din = '0;
  logic din_ready, dout, dout_valid, word_ok, busy;
  iter_t word_iters;
  logic [N-1:0] stat_mask;
  logic [M-1:0] syndrome;
  tot_t app_llr [N];

  min_sum dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- reference model ----------------
  function automatic int clamp(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction
  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  typedef struct { int word; int iters; int ok; int nstat; } result_t;

  function automatic result_t model(int llr [N]);
    int c2v [M][N], v2c [M][N], est [M][N];
    int stat [N], sbit [N], hd [N];
    automatic int it = 0;
    result_t res;
    res.nstat = 0;
    for (int r = 0; r < M; r++) for (int c = 0; c < N; c++) begin c2v[r][c] = 0; est[r][c] = 0; end
    for (int c = 0; c < N; c++) begin stat[c] = 0; sbit[c] = 0; end
    forever begin
      automatic int syn_ok = 1;
      // variable-node pass
      for (int c = 0; c < N; c++) begin
        automatic int tot = clamp(llr[c], -7, 7);
        for (int r = 0; r < M; r++) if (H_ROWS[r][c]) tot += c2v[r][c];
        for (int r = 0; r < M; r++) if (H_ROWS[r][c]) begin
          v2c[r][c] = stat[c] ? (sbit[c] ? -7 : 7) : clamp(tot - c2v[r][c], -7, 7);
          est[r][c] = stat[c];
        end
        hd[c] = stat[c] ? sbit[c] : (tot < 0);
        if (!stat[c] && iabs(tot) >= STAT_THRESH) begin
          stat[c] = 1; sbit[c] = (tot < 0); res.nstat++;
        end
      end
      for (int r = 0; r < M; r++) begin
        automatic int p = 0;
        for (int c = 0; c < N; c++) if (H_ROWS[r][c]) p ^= hd[c];
        if (p) syn_ok = 0;
      end
      if (syn_ok || it == MAX_ITER) begin
        res.word = 0;
        for (int c = 0; c < N; c++) res.word |= hd[c] << c;
        res.iters = it; res.ok = syn_ok;
        return res;
      end
      // check-node pass
      for (int r = 0; r < M; r++)
        for (int c = 0; c < N; c++) if (H_ROWS[r][c]) begin
          automatic int s = 0, m = 7;
          for (int j = 0; j < N; j++) if (H_ROWS[r][j] && j != c) begin
            if (v2c[r][j] < 0) s ^= 1;
            if (!est[r][j] && iabs(v2c[r][j]) < m) m = iabs(v2c[r][j]);
          end
          c2v[r][c] = s ? -m : m;
        end
      it++;
    end
  endfunction

  // ---------------- stimulus ----------------
  int codewords [$];
  result_t exp_q [$];
  int      sent_q [$], chan_q [$];
  int n_early = 0, n_limit = 0, n_stat = 0, n_estat = 0, n_bp = 0, n_owait = 0;
  int n_clip = 0, n_corr = 0, n_words = 0, n_lat = 0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 128; x++) begin
      automatic int good = 1;
      for (int r = 0; r < M; r++) begin
        automatic int p = 0;
        for (int c = 0; c < N; c++) if (H_ROWS[r][c]) p ^= (x >> c) & 1;
        if (p) good = 0;
      end
      if (good) codewords.push_back(x);
    end
    $display("code words of H: %0d", codewords.size());
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      automatic int cw, amp, spread, llr [N], chw = 0;
      result_t res;
      cw = codewords[$urandom_range(codewords.size() - 1)];
      amp = $urandom_range(1, 6);
      spread = $urandom_range(1, 5);
      for (int c = 0; c < N; c++) begin
        automatic int y = ((cw >> c) & 1) ? -amp : amp;
        for (int j = 0; j < 3; j++) y += int'($urandom_range(2 * spread)) - spread;
        llr[c] = clamp(y, -8, 7);
        if (llr[c] == -8) n_clip++;
        if (llr[c] < 0) chw |= 1 << c;
      end
      res = model(llr);
      exp_q.push_back(res);
      sent_q.push_back(cw);
      chan_q.push_back(chw);
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        while ((f % 4 == 1) && $urandom_range(3) == 0) begin din_valid = 0; @(negedge clk); end
        din = LLR_W'(llr[c]);
        din_valid = 1;
        @(posedge clk);
        while (!din_ready) begin n_bp++; @(posedge clk); end
        #1;
      end
      @(negedge clk);
      din_valid = 0;
    end
    wait (exp_q.size() == 0);
    repeat (20) @(posedge clk);
    chk("all words received", n_words, FRAMES);
    chk("latencies measured", n_lat, FRAMES);
    $display("early stops %0d, stops at the limit %0d, nodes made stationary %0d, check passes with stationary edges %0d",
             n_early, n_limit, n_stat, n_estat);
    $display("input back-pressure clocks %0d, output waits %0d, clipped inputs %0d, frames with corrected errors %0d",
             n_bp, n_owait, n_clip, n_corr);
    chk("early stop seen", int'(n_early > 0), 1);
    chk("iteration limit seen", int'(n_limit > 0), 1);
    chk("stationary node seen", int'(n_stat > 0), 1);
    chk("reduced check pass seen", int'(n_estat > 0), 1);
    chk("input back-pressure seen", int'(n_bp > 0), 1);
    chk("output wait seen", int'(n_owait > 0), 1);
    chk("clipping seen", int'(n_clip > 0), 1);
    chk("correction seen", int'(n_corr > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitors ----------------
  logic [N-1:0] prev_stat = '0;
  int take_cyc [$], iter_q [$];
  int cyc = 0, owait_cur = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      n_stat += $countones(stat_mask & ~prev_stat);
      if (dut.u_ctrl.c_en) begin
        for (int r = 0; r < M; r++) for (int k = 0; k < DC_MAX; k++)
          if (dut.u_perm.cn_stat[r][k] && k < row_deg(r)) begin n_estat++; break; end
      end
      if (dut.u_ctrl.state == dut.u_ctrl.DONE && !dut.out_idle) begin
        n_owait++;
        owait_cur++;
      end
      if (dut.take) take_cyc.push_back(cyc);
      if (dut.word_valid) begin
        automatic int t0 = take_cyc.pop_front();
        automatic int it = int'(dut.u_ctrl.iter);
        chk("latency", cyc - t0, 2 * (it + 1) + 1 + owait_cur);
        owait_cur = 0;
        n_lat++;
      end
    end
    prev_stat <= stat_mask;
  end

  int bitpos = 0, got = 0;
  always @(posedge clk) begin
    if (rst_n && dout_valid) begin
      got |= int'(dout) << bitpos;
      bitpos++;
      if (bitpos == N) begin
        automatic result_t e = exp_q.pop_front();
        automatic int cw = sent_q.pop_front(), chw = chan_q.pop_front();
        chk("word", got, e.word);
        chk("iters", int'(word_iters), e.iters);
        chk("ok", int'(word_ok), e.ok);
        if (e.ok && e.iters < MAX_ITER) n_early++;
        if (e.iters == MAX_ITER) n_limit++;
        if (chw != cw && got == cw) n_corr++;
        n_words++;
        bitpos = 0; got = 0;
      end
    end
  end
endmodule
