// vnfu_tb: self-checking test of the variable-node unit.
// Random channel values and check messages (and the freeze input) are applied to a
// degree-3 and a degree-2 unit; the total and every extrinsic message are compared with
// integer arithmetic done here, saturated to +/-7.
module vnfu_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  msg_t lch, c2v3 [3], v2c3 [3], c2v2 [2], v2c2 [2];
  logic freeze, fb;
  tot_t tot3, tot2;

  vnfu #(.DEG(3)) dut3 (.lch, .c2v(c2v3), .freeze, .frz_bit(fb), .total(tot3), .v2c(v2c3));
  vnfu #(.DEG(2)) dut2 (.lch, .c2v(c2v2), .freeze, .frz_bit(fb), .total(tot2), .v2c(v2c2));

  function automatic int rnd7();
    return int'($urandom_range(14)) - 7;
  endfunction
  function automatic int sat7(int v);
    return v > 7 ? 7 : (v < -7 ? -7 : v);
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int l, a[3], s3, s2;
      l = rnd7();
      for (int k = 0; k < 3; k++) a[k] = rnd7();
      if (t < 4) begin  // corners: all at the positive / negative limit
        l = (t % 2) ? -7 : 7;
        for (int k = 0; k < 3; k++) a[k] = l;
      end
      freeze = (t % 5 == 4);
      fb     = $urandom_range(1);
      lch = msg_t'(l);
      for (int k = 0; k < 3; k++) c2v3[k] = msg_t'(a[k]);
      for (int k = 0; k < 2; k++) c2v2[k] = msg_t'(a[k]);
      #1;
      s3 = l + a[0] + a[1] + a[2];
      s2 = l + a[0] + a[1];
      chk("total3", int'(tot3), s3);
      chk("total2", int'(tot2), s2);
      for (int k = 0; k < 3; k++)
        chk("v2c3", int'(v2c3[k]), freeze ? (fb ? -7 : 7) : sat7(s3 - a[k]));
      for (int k = 0; k < 2; k++)
        chk("v2c2", int'(v2c2[k]), freeze ? (fb ? -7 : 7) : sat7(s2 - a[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
