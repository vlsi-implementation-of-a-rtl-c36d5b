// intrinsic_mem: intrinsic (channel) LLR memory of the decoder.
//
// Holds the N channel LLRs of the frame being decoded, so that the input stage can
// already collect the next frame. All N words are written at once on load and read in
// parallel by the N variable-node units, as a fully parallel decoder needs; the memory
// is a register array. The block is named in the decoder's block diagram; its
// organisation is this design's choice.
module intrinsic_mem
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  msg_t wdata [N],
  output msg_t rdata [N]
);

  msg_t mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N; c++) mem[c] <= '0;
    end else if (load) begin
      for (int c = 0; c < N; c++) mem[c] <= wdata[c];
    end
  end

  assign rdata = mem;

endmodule
