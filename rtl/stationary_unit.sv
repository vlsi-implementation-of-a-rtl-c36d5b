// stationary_unit: threshold control of the min-sum decoder.
//
// A variable node whose a posteriori LLR is large in magnitude gives nearly the same
// information in every further iteration. When, on an update strobe, |total[c]| reaches
// THRESH, node c is declared stationary for the rest of the frame and the sign of its
// total is stored as its fixed hard decision. A stationary node stops computing: its VNFU
// sends the stored decision at full confidence and the check units leave it out of their
// minimum search, which is the reduced form of H for the following iterations. clear
// (start of a frame) releases all nodes.
//
// The stationary rule follows the decoder's description; the threshold value, the
// comparison (>=) and the per-frame lifetime of the flag are this design's choices.
//
// Ports: total[N] from the VNFUs, update (a variable-node pass has been computed),
// stat[N] and stat_bit[N] registered, one clock after the update.
module stationary_unit
  import ldpc_pkg::*;
#(
  parameter int THRESH = STAT_THRESH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic update,
  input  tot_t total    [N],
  output logic stat     [N],
  output logic stat_bit [N]
);

  for (genvar c = 0; c < N; c++) begin : g_node
    logic reach;
    assign reach = (total[c] >= tot_t'(THRESH)) || (total[c] <= tot_t'(-THRESH));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        stat[c]     <= 1'b0;
        stat_bit[c] <= 1'b0;
      end else if (clear) begin
        stat[c]     <= 1'b0;
        stat_bit[c] <= 1'b0;
      end else if (update && !stat[c] && reach) begin
        stat[c]     <= 1'b1;
        stat_bit[c] <= total[c][TOT_W-1];
      end
    end
  end

endmodule
