// decoder_ctrl_tb: self-checking test of the decoder schedule.
// For each frame the test picks after how many variable-node passes the parity check
// succeeds (or never, so the iteration limit applies) and how long the output stage
// stays busy. It then counts the v_en and c_en pulses, checks that they alternate, and
// checks the clocks from take to word_valid: 2*(i+1)+1 for i check passes, plus the
// output wait, as well as the reported iteration count and convergence flag.
module decoder_ctrl_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic  clk = 0, rst_n = 0, frame_rdy = 0, ok = 0, out_idle = 1;
  logic  take, v_en, c_en, word_valid, busy, converged;
  iter_t iters;
  int    early = 0, at_limit = 0, waited = 0;

  decoder_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      int stop_after, wait_out, vcnt, ccnt, cyc, exp_it, last;
      stop_after = $urandom_range(MAX_ITER + 3);   // > MAX_ITER: never converges
      wait_out   = (f % 3 == 0) ? $urandom_range(1, 6) : 0;
      @(negedge clk);
      frame_rdy = 1;
      #1;
      chk("take", int'(take), 1);
      @(negedge clk);
      frame_rdy = 0;
      vcnt = 0; ccnt = 0; cyc = 1; last = 2;
      out_idle = (wait_out == 0);
      while (!word_valid) begin
        chk("not both", int'(v_en && c_en), 0);
        if (v_en) begin
          chk("alternate v", last, 2); last = 1; vcnt++;
        end
        if (c_en) begin
          chk("alternate c", last, 1); last = 2; ccnt++;
        end
        ok = (vcnt > stop_after) ? 1'b1 : ((vcnt == stop_after + 1) ? 1'b1 : 1'b0);
        @(negedge clk);
        cyc++;
        if (!out_idle && busy && !v_en && !c_en && vcnt > 0) begin
          if (wait_out > 0) begin wait_out--; waited++; end
          if (wait_out == 0) out_idle = 1;
        end
        if (cyc > 100) break;
      end
      exp_it = (stop_after < MAX_ITER) ? stop_after : MAX_ITER;
      if (stop_after < MAX_ITER) early++; else at_limit++;
      chk("v passes", vcnt, exp_it + 1);
      chk("c passes", ccnt, exp_it);
      @(negedge clk);
      chk("iters", int'(iters), exp_it);
      chk("converged", int'(converged), int'(stop_after <= MAX_ITER));
      chk("idle", int'(busy), 0);
      ok = 0; out_idle = 1;
      if (f % 3 != 0) chk("latency", cyc, 2 * (exp_it + 1) + 1);
      else chk("latency with wait", int'(cyc >= 2 * (exp_it + 1) + 1), 1);
    end
    chk("early stops", int'(early > 0), 1);
    chk("limit stops", int'(at_limit > 0), 1);
    chk("output waits", int'(waited > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
