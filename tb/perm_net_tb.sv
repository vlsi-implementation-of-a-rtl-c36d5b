// perm_net_tb: self-checking test of the permutation network.
// Every variable-node edge slot gets a distinct value; after v_load each check-node slot
// must show the value of the variable node that shares that '1' of H. The test finds
// the pairing itself by scanning the rows and columns of H. The reverse direction,
// the stationary flags, hold without a load and clear are checked the same way.
module perm_net_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, v_load = 0, c_load = 0;
  msg_t vn_v2c [N][DV_MAX], cn_c2v [M][DC_MAX], cn_v2c [M][DC_MAX], vn_c2v [N][DV_MAX];
  logic vn_stat [N], cn_stat [M][DC_MAX];

  perm_net dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // k-th '1' of column c is in row vrow[c][k]; k-th '1' of row r is in column crow[r][k]
  int vrow [N][DV_MAX], ccol [M][DC_MAX];
  int vslot [M][N], cslot [M][N];   // slot of edge (r,c) at the VN side and at the CN side

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N; c++) begin
      automatic int n = 0;
      for (int r = 0; r < M; r++) if (H_ROWS[r][c]) begin vrow[c][n] = r; vslot[r][c] = n; n++; end
    end
    for (int r = 0; r < M; r++) begin
      automatic int n = 0;
      for (int c = 0; c < N; c++) if (H_ROWS[r][c]) begin ccol[r][n] = c; cslot[r][c] = n; n++; end
    end
    for (int c = 0; c < N; c++) begin
      vn_stat[c] = 1'b0;
      for (int k = 0; k < DV_MAX; k++) vn_v2c[c][k] = '0;
    end
    for (int r = 0; r < M; r++) for (int k = 0; k < DC_MAX; k++) cn_c2v[r][k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      int rv [N][DV_MAX], rc [M][DC_MAX], rs [N];
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        rs[c] = $urandom_range(1);
        vn_stat[c] = rs[c][0];
        for (int k = 0; k < DV_MAX; k++) begin
          rv[c][k] = int'($urandom_range(14)) - 7;
          vn_v2c[c][k] = msg_t'(rv[c][k]);
        end
      end
      for (int r = 0; r < M; r++) for (int k = 0; k < DC_MAX; k++) begin
        rc[r][k] = int'($urandom_range(14)) - 7;
        cn_c2v[r][k] = msg_t'(rc[r][k]);
      end
      v_load = 1; c_load = 1;
      @(negedge clk);
      v_load = 0; c_load = 0;
      for (int r = 0; r < M; r++)
        for (int k = 0; k < DC_MAX; k++) begin
          if (k < 4 && ccol[r][k] >= 0) begin
            automatic int c = ccol[r][k];
            chk("cn_v2c", int'(cn_v2c[r][k]), rv[c][vslot[r][c]]);
            chk("cn_stat", int'(cn_stat[r][k]), rs[c]);
          end
        end
      for (int c = 0; c < N; c++)
        for (int k = 0; k < DV_MAX; k++) begin
          automatic int dv = 0;
          for (int r = 0; r < M; r++) dv += H_ROWS[r][c];
          if (k < dv) begin
            automatic int r = vrow[c][k];
            chk("vn_c2v", int'(vn_c2v[c][k]), rc[r][cslot[r][c]]);
          end else chk("vn_c2v pad", int'(vn_c2v[c][k]), 0);
        end
      // new inputs without load: outputs must hold
      for (int r = 0; r < M; r++) for (int k = 0; k < DC_MAX; k++) cn_c2v[r][k] = msg_t'(1);
      @(negedge clk);
      for (int c = 0; c < N; c++) if (H_ROWS[vrow[c][0]][c]) begin
        automatic int r = vrow[c][0];
        chk("hold", int'(vn_c2v[c][0]), rc[r][cslot[r][c]]);
      end
      if (t % 10 == 9) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        for (int c = 0; c < N; c++) for (int k = 0; k < DV_MAX; k++)
          chk("clear", int'(vn_c2v[c][k]), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
