// codeword_out: output stage sending the decoded code word out serially.
//
// When word_valid is high and the stage is idle it copies the N-bit word (bit 0 = VN1)
// and then presents one bit per clock on dout, VN1 first, with dout_valid high for N
// clocks. idle tells the controller when a new word may be handed over. The single-bit
// output follows the one output pin of the decoder's top level; the order and the
// timing are this design's choices.
module codeword_out
  import ldpc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         word_valid,
  input  logic [N-1:0] word,
  output logic         idle,
  output logic         dout,
  output logic         dout_valid
);

  localparam int CNT_W = $clog2(N + 1);
  logic [CNT_W-1:0] left;
  logic [N-1:0]     sr;

  assign idle       = (left == '0);
  assign dout_valid = !idle;
  assign dout       = sr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0;
      sr   <= '0;
    end else if (idle) begin
      if (word_valid) begin
        sr   <= word;
        left <= CNT_W'(N);
      end
    end else begin
      sr   <= sr >> 1;
      left <= left - 1'b1;
    end
  end

endmodule
