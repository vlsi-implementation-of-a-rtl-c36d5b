// channel_in_tb: self-checking test of the input stage.
// Frames of random 4-bit values are offered with random gaps in din_valid; the frame
// buffer must hold them in order (VN1 first) with -8 clipped to -7, din_ready must drop
// while a full frame waits, and take must free the buffer.
module channel_in_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, din_valid = 0, take = 0;
  msg_t din, frame [N];
  logic din_ready, frame_rdy;
  int   stalls = 0;

  channel_in dut (.*);

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
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      int v [N];
      for (int c = 0; c < N; c++) begin
        v[c] = int'($urandom_range(15)) - 8;
        @(negedge clk);
        while ($urandom_range(2) == 0) begin din_valid = 0; @(negedge clk); end
        chk("ready while filling", int'(din_ready), 1);
        din = msg_t'(v[c]);
        din_valid = 1;
        @(negedge clk);
        din_valid = 0;
      end
      chk("frame_rdy", int'(frame_rdy), 1);
      chk("ready when full", int'(din_ready), 0);
      // a value offered now must not be taken
      din = msg_t'(3); din_valid = 1;
      repeat ($urandom_range(3)) begin @(negedge clk); stalls++; end
      for (int c = 0; c < N; c++)
        chk("frame", int'(frame[c]), v[c] == -8 ? -7 : v[c]);
      din_valid = 0;
      take = 1;
      @(negedge clk);
      take = 0;
      chk("emptied", int'(frame_rdy), 0);
    end
    chk("stalls seen", int'(stalls > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
