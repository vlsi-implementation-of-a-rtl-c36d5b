// intrinsic_mem_tb: self-checking test of the intrinsic LLR memory.
// Random frames are written with load; the contents must change only on load and read
// back unchanged in the following clocks while the write data keeps changing.
module intrinsic_mem_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, load = 0;
  msg_t wdata [N], rdata [N];
  int   model [N];

  intrinsic_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N; c++) begin wdata[c] = '0; model[c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      int v [N];
      @(negedge clk);
      load = ($urandom_range(3) == 0);
      for (int c = 0; c < N; c++) begin
        v[c] = int'($urandom_range(14)) - 7;
        wdata[c] = msg_t'(v[c]);
      end
      @(posedge clk);
      #1;
      if (load) for (int c = 0; c < N; c++) model[c] = v[c];
      for (int c = 0; c < N; c++) begin
        checks++;
        if (int'(rdata[c]) != model[c]) begin
          failures++;
          $display("FAIL t=%0d word %0d: got %0d expected %0d", t, c, rdata[c], model[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
