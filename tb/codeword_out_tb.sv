// codeword_out_tb: self-checking test of the serial output stage.
// Random 7-bit words are handed over, sometimes while the stage is still busy (they
// must be ignored). Each accepted word must appear on dout bit 0 first, one bit per
// clock, for exactly 7 clocks with dout_valid high, and idle must be low meanwhile.
module codeword_out_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, word_valid = 0;
  logic [N-1:0] word;
  logic idle, dout, dout_valid;

  codeword_out dut (.*);

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
    word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [N-1:0] w;
      @(negedge clk);
      chk("idle before", int'(idle), 1);
      chk("no valid when idle", int'(dout_valid), 0);
      w = N'($urandom);
      word = w; word_valid = 1;
      @(negedge clk);
      word_valid = 0;
      for (int c = 0; c < N; c++) begin
        chk("valid", int'(dout_valid), 1);
        chk("busy", int'(idle), 0);
        chk("bit", int'(dout), int'(w[c]));
        if (c == 2) begin word = ~w; word_valid = 1; end   // must be ignored
        @(negedge clk);
        word_valid = 0;
      end
      repeat ($urandom_range(2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
