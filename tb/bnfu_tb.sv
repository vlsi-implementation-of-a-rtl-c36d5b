// bnfu_tb: self-checking test of the check-node unit.
// Random messages in [-7, 7] and random stationary flags drive a degree-4 unit. For each
// edge the expected output is formed here directly from the definition: sign = XOR of
// the other signs, magnitude = minimum magnitude of the other, non-stationary edges (7
// if there is none).
module bnfu_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  msg_t v2c [4], c2v [4];
  logic stat [4];

  bnfu #(.DEG(4)) dut (.v2c, .stat, .c2v);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int a[4];
      for (int k = 0; k < 4; k++) begin
        a[k] = int'($urandom_range(14)) - 7;
        if (t % 7 == 0) a[k] = (a[k] < 0) ? -2 : 2;   // ties between minima
        v2c[k]  = msg_t'(a[k]);
        stat[k] = ($urandom_range(3) == 0);
      end
      if (t < 100) for (int k = 0; k < 4; k++) stat[k] = 1'b0;
      #1;
      for (int k = 0; k < 4; k++) begin
        int s, m, e;
        s = 0; m = 7;
        for (int j = 0; j < 4; j++) if (j != k) begin
          if (a[j] < 0) s ^= 1;
          if (!stat[j] && (a[j] < 0 ? -a[j] : a[j]) < m) m = (a[j] < 0 ? -a[j] : a[j]);
        end
        e = s ? -m : m;
        checks++;
        if (int'(c2v[k]) != e) begin
          failures++;
          $display("FAIL t=%0d edge %0d: got %0d expected %0d", t, k, c2v[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
