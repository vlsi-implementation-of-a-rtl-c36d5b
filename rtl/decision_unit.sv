// decision_unit: hard decision and parity check of the decoder's estimate.
//
// On each update strobe (after a variable-node pass) it registers the estimated code
// word: bit c is 1 when the total LLR of node c is negative, or the stored decision when
// node c is stationary. In the same clock it computes the syndrome H*x over GF(2) from
// that estimate and registers ok = 1 when every parity check is satisfied; the
// controller uses ok to stop decoding early. clear resets the estimate at the start of a
// frame. The block is only named in the decoder's block diagram; syndrome-based stopping
// is this design's choice.
//
// Ports: total[N], stat[N], stat_bit[N] in; hard (bit 0 = VN1), syndrome (bit 0 = CN1)
// and ok out, registered.
module decision_unit
  import ldpc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         update,
  input  tot_t         total    [N],
  input  logic         stat     [N],
  input  logic         stat_bit [N],
  output logic [N-1:0] hard,
  output logic [M-1:0] syndrome,
  output logic         ok
);

  logic [N-1:0] hd_d;
  logic [M-1:0] syn_d;

  always_comb begin
    for (int c = 0; c < N; c++)
      hd_d[c] = stat[c] ? stat_bit[c] : total[c][TOT_W-1];
    for (int r = 0; r < M; r++) begin
      syn_d[r] = 1'b0;
      for (int c = 0; c < N; c++)
        if (H_ROWS[r][c]) syn_d[r] ^= hd_d[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hard     <= '0;
      syndrome <= '0;
      ok       <= 1'b0;
    end else if (clear) begin
      hard     <= '0;
      syndrome <= '0;
      ok       <= 1'b0;
    end else if (update) begin
      hard     <= hd_d;
      syndrome <= syn_d;
      ok       <= ~|syn_d;
    end
  end

endmodule
