// bnfu: check-node functional unit of the min-sum decoder (one per parity check).
//
// Combinational. For each of its DEG edges the unit returns the min-sum check message:
// the sign is the XOR of the signs of all other incoming messages, the magnitude the
// smallest magnitude among the other messages. It finds the smallest and second-smallest
// magnitude and the position of the smallest once, so each output needs only a select.
//
// Threshold control: an edge whose variable node has been declared stationary (stat[k])
// still contributes its sign, because the parity check must still hold with that bit
// fixed, but its magnitude is left out of the minimum search, as if that column had been
// removed from H. If every other edge of a check is stationary the output carries full
// confidence, +/-MSG_MAX. Min-sum itself is the standard algorithm; how stationary edges
// enter the check is this design's reading of the reduced-matrix rule.
//
// Ports: v2c[DEG] (incoming), stat[DEG] (edge comes from a stationary node),
// c2v[DEG] (outgoing). No clock.
module bnfu
  import ldpc_pkg::*;
#(
  parameter int DEG = 4
) (
  input  msg_t v2c  [DEG],
  input  logic stat [DEG],
  output msg_t c2v  [DEG]
);

  localparam int MAG_W = LLR_W - 1;
  localparam int IDX_W = (DEG > 1) ? $clog2(DEG) : 1;

  always_comb begin
    logic             sgn_all;
    logic [MAG_W-1:0] mag;
    logic [MAG_W-1:0] min1, min2, m;
    logic [IDX_W-1:0] idx;
    sgn_all = 1'b0;
    min1    = MAG_W'(MSG_MAX);
    min2    = MAG_W'(MSG_MAX);
    idx     = '0;
    for (int k = 0; k < DEG; k++) begin
      sgn_all ^= v2c[k][LLR_W-1];
      mag = v2c[k][LLR_W-1] ? MAG_W'(-v2c[k]) : MAG_W'(v2c[k]);
      if (!stat[k]) begin
        if (mag < min1) begin
          min2 = min1;
          min1 = mag;
          idx  = IDX_W'(k);
        end else if (mag < min2) begin
          min2 = mag;
        end
      end
    end
    for (int k = 0; k < DEG; k++) begin
      m = (!stat[k] && idx == IDX_W'(k)) ? min2 : min1;
      c2v[k] = (sgn_all ^ v2c[k][LLR_W-1]) ? -msg_t'({1'b0, m}) : msg_t'({1'b0, m});
    end
  end

endmodule
