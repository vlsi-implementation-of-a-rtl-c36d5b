// perm_net: permutation network between the variable-node and check-node units.
//
// It connects edge k of VNFU c to the matching edge of the BNFU that shares that '1' of
// H, and back, following the Tanner graph of H (ldpc_pkg). It also holds the systolic
// pipeline registers of the decoder: one variable-to-check and one check-to-variable
// register per edge of H. On v_load every edge captures the message its VNFU produces,
// together with whether that node was stationary when it produced it; on c_load every
// edge captures the message its BNFU produces. clear zeroes the check-to-variable
// registers at the start of a frame, so the first variable-node pass sees only the
// channel values.
//
// The unused slots of a node with fewer than DV_MAX / DC_MAX edges read as zero and are
// ignored by the unit they feed. The routing is what the decoder block diagram and the
// Tanner graph show; storing the messages here, per edge, is this design's choice.
//
// Timing: one clock per direction; outputs come straight from the edge registers.
module perm_net
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic v_load,
  input  logic c_load,
  input  msg_t vn_v2c  [N][DV_MAX],   // from the VNFUs
  input  logic vn_stat [N],           // stationary flag of each VNFU
  input  msg_t cn_c2v  [M][DC_MAX],   // from the BNFUs
  output msg_t cn_v2c  [M][DC_MAX],   // to the BNFUs
  output logic cn_stat [M][DC_MAX],
  output msg_t vn_c2v  [N][DV_MAX]    // to the VNFUs
);

  msg_t v2c_q  [E];
  logic stat_q [E];
  msg_t c2v_q  [E];

  for (genvar c = 0; c < N; c++) begin : g_vn
    for (genvar k = 0; k < col_deg(c); k++) begin : g_e
      localparam int EI = vn_edge(c, k);
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          v2c_q[EI]  <= '0;
          stat_q[EI] <= 1'b0;
        end else if (v_load) begin
          v2c_q[EI]  <= vn_v2c[c][k];
          stat_q[EI] <= vn_stat[c];
        end
      end
      assign vn_c2v[c][k] = c2v_q[EI];
    end
    for (genvar k = col_deg(c); k < DV_MAX; k++) begin : g_pad
      assign vn_c2v[c][k] = '0;
    end
  end

  for (genvar r = 0; r < M; r++) begin : g_cn
    for (genvar k = 0; k < row_deg(r); k++) begin : g_e
      localparam int EI = cn_edge(r, k);
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)      c2v_q[EI] <= '0;
        else if (clear)  c2v_q[EI] <= '0;
        else if (c_load) c2v_q[EI] <= cn_c2v[r][k];
      end
      assign cn_v2c[r][k]  = v2c_q[EI];
      assign cn_stat[r][k] = stat_q[EI];
    end
    for (genvar k = row_deg(r); k < DC_MAX; k++) begin : g_pad
      assign cn_v2c[r][k]  = '0;
      assign cn_stat[r][k] = 1'b1;
    end
  end

endmodule
