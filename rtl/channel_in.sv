// channel_in: input stage of the decoder, receiving the channel values of one frame.
//
// The decoder takes one 4-bit channel LLR per clock on din (two's complement, positive
// favours bit 0), VN1 first. A valid/ready handshake paces the input: a value is taken
// in a clock where din_valid and din_ready are both high. The stage collects N values
// into a frame buffer; when it is full it raises frame_rdy and drops din_ready until the
// controller takes the frame (take), which it may do while the previous frame is still
// being decoded from the intrinsic memory. The most negative code, -8, is clipped to -7
// so that all messages are symmetric.
//
// The 4-bit serial input follows the decoder's top-level port din(3:0); the handshake,
// the clipping and the buffering are this design's choices.
module channel_in
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  msg_t din,
  input  logic din_valid,
  output logic din_ready,
  input  logic take,
  output logic frame_rdy,
  output msg_t frame [N]
);

  localparam int CNT_W = $clog2(N + 1);
  logic [CNT_W-1:0] cnt;
  msg_t             clipped;

  assign frame_rdy = (cnt == CNT_W'(N));
  assign din_ready = !frame_rdy;
  assign clipped   = (din == msg_t'(-MSG_MAX - 1)) ? msg_t'(-MSG_MAX) : din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int c = 0; c < N; c++) frame[c] <= '0;
    end else if (take && frame_rdy) begin
      cnt <= '0;
    end else if (din_valid && din_ready) begin
      frame[cnt] <= clipped;
      cnt        <= cnt + 1'b1;
    end
  end

  take_only_when_ready: assert property (@(posedge clk) disable iff (!rst_n) take |-> frame_rdy);

endmodule
