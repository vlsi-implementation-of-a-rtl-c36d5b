// decision_unit_tb: self-checking test of the hard decision and parity check.
// Random totals and stationary flags are applied with update strobes. The expected
// word takes the stored bit for stationary nodes and the sign otherwise; the expected
// syndrome is computed here from the rows of H written out as bit lists. Code words
// of H are also applied so that ok = 1 is seen.
module decision_unit_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, update = 0;
  tot_t total [N];
  logic stat [N], stat_bit [N];
  logic [N-1:0] hard;
  logic [M-1:0] syndrome;
  logic ok;
  int   oks = 0;

  decision_unit dut (.*);

  always #5 clk = ~clk;

  // columns (0-based) taking part in each check, from the 5 x 7 matrix
  int rows [5][4] = '{'{0,1,2,4}, '{0,1,3,5}, '{0,2,3,6}, '{3,4,5,6}, '{2,4,5,6}};

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
    int exp_hd, exp_syn, prev_hd, prev_syn;
    for (int c = 0; c < N; c++) begin total[c] = '0; stat[c] = 0; stat_bit[c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev_hd = 0; prev_syn = 0;
    for (int t = 0; t < 2000; t++) begin
      int bits;
      @(negedge clk);
      bits = $urandom_range(127);
      if (t % 3 == 0) begin  // pick a code word: brute force search from a random start
        for (int w = 0; w < 128; w++) begin
          automatic int x = (bits + w) % 128, s = 0;
          for (int r = 0; r < 5; r++) begin
            automatic int p = 0;
            for (int j = 0; j < 4; j++) p ^= (x >> rows[r][j]) & 1;
            s |= p << r;
          end
          if (s == 0) begin bits = x; break; end
        end
      end
      for (int c = 0; c < N; c++) begin
        automatic int b = (bits >> c) & 1, mag = $urandom_range(20);
        stat[c] = ($urandom_range(3) == 0);
        stat_bit[c] = b[0];
        total[c] = stat[c] ? tot_t'(int'($urandom_range(40)) - 20) : tot_t'(b ? -1 - mag : mag);
      end
      update = ($urandom_range(3) != 0);
      exp_hd = bits; exp_syn = 0;
      for (int r = 0; r < 5; r++) begin
        automatic int p = 0;
        for (int j = 0; j < 4; j++) p ^= (bits >> rows[r][j]) & 1;
        exp_syn |= p << r;
      end
      @(posedge clk);
      #1;
      if (update) begin prev_hd = exp_hd; prev_syn = exp_syn; end
      chk("hard", int'(hard), prev_hd);
      chk("syndrome", int'(syndrome), prev_syn);
      chk("ok", int'(ok), int'(prev_syn == 0));
      if (ok) oks++;
      update = 0;
    end
    chk("code words seen", int'(oks > 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
