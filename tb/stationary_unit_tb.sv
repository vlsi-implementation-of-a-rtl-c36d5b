// stationary_unit_tb: self-checking test of the threshold control.
// Random totals are applied with random update strobes; a model kept here marks a node
// when |total| >= 14 on an update and then holds flag and sign until clear. Flags and
// stored bits are compared after every clock. The threshold boundary is exercised
// explicitly (13, 14, -13, -14).
module stationary_unit_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, update = 0;
  tot_t total [N];
  logic stat [N], stat_bit [N];
  int   m_stat [N], m_bit [N];

  stationary_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N; c++) begin total[c] = '0; m_stat[c] = 0; m_bit[c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int v [N];
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        v[c] = int'($urandom_range(56)) - 28;
        if (t < 8) v[c] = (t % 4 == 0) ? 13 : (t % 4 == 1) ? -13 : (t % 4 == 2) ? 14 : -14;
        total[c] = tot_t'(v[c]);
      end
      update = (t < 8) ? 1'b1 : ($urandom_range(2) == 0);
      clear  = (t % 97 == 96);
      @(posedge clk);
      #1;
      for (int c = 0; c < N; c++) begin
        if (clear) begin m_stat[c] = 0; m_bit[c] = 0; end
        else if (update && !m_stat[c] && (v[c] >= 14 || v[c] <= -14)) begin
          m_stat[c] = 1; m_bit[c] = (v[c] < 0);
        end
        checks++;
        if (int'(stat[c]) != m_stat[c] || int'(stat_bit[c]) != m_bit[c]) begin
          failures++;
          $display("FAIL t=%0d node %0d: stat %0d/%0d bit %0d/%0d", t, c, stat[c], m_stat[c],
                   stat_bit[c], m_bit[c]);
        end
      end
      update = 0; clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
