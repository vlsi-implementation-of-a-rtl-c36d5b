// vnfu: variable-node functional unit of the min-sum decoder (one per code bit).
//
// Combinational. The unit adds the channel LLR of its bit to the DEG check-to-variable
// messages it receives, giving the a posteriori total. The message it returns on edge k
// is the total minus what came in on edge k (the extrinsic value), saturated to
// +/-MSG_MAX. When the stationary unit has frozen this node, the unit no longer sends
// extrinsic values: every edge carries the frozen hard decision at full confidence
// (+MSG_MAX for bit 0, -MSG_MAX for bit 1), which is how the node drops out of the
// reduced parity-check matrix. The sum/subtract form is the standard min-sum variable
// update; the frozen output encoding is this design's choice.
//
// Ports: lch (channel LLR), c2v[DEG] (incoming), freeze/frz_bit (from the stationary
// unit), total (a posteriori LLR), v2c[DEG] (outgoing). No clock; the permutation
// network registers the outputs.
module vnfu
  import ldpc_pkg::*;
#(
  parameter int DEG = 3
) (
  input  msg_t lch,
  input  msg_t c2v [DEG],
  input  logic freeze,
  input  logic frz_bit,
  output tot_t total,
  output msg_t v2c [DEG]
);

  function automatic msg_t sat(tot_t v);
    if (v > tot_t'(MSG_MAX))  return msg_t'(MSG_MAX);
    if (v < tot_t'(-MSG_MAX)) return msg_t'(-MSG_MAX);
    return msg_t'(v);
  endfunction

  always_comb begin
    tot_t acc;
    acc = tot_t'(lch);
    for (int k = 0; k < DEG; k++) acc += tot_t'(c2v[k]);
    total = acc;
    for (int k = 0; k < DEG; k++) begin
      if (freeze) v2c[k] = frz_bit ? msg_t'(-MSG_MAX) : msg_t'(MSG_MAX);
      else        v2c[k] = sat(acc - tot_t'(c2v[k]));
    end
  end

endmodule
