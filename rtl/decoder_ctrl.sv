// decoder_ctrl: schedule of the iterative decoder.
//
// States:
//   IDLE  wait for a full frame in the input stage; take it (load the intrinsic memory,
//         clear the check messages, stationary flags and decision), go to VPH.
//   VPH   variable-node pass: the VNFUs' messages are latched into the permutation
//         network, and the stationary and decision units are updated (v_en).
//   CPH   check-node pass. If the decision registered in VPH satisfies every parity
//         check (ok), or MAX_ITER check passes have been made, decoding ends (DONE);
//         otherwise the BNFUs' messages are latched (c_en), the iteration count goes up
//         and the next VPH follows.
//   DONE  hand the decoded word to the output stage as soon as it is idle; record the
//         iteration count and whether the word is a code word; back to IDLE.
// A frame that stops after i check passes therefore takes 2*(i+1)+1 clocks from the
// clock that takes it to the clock that hands its word over.
//
// Flooding (all variable nodes, then all check nodes) and the two-clock iteration are
// this design's reading of the systolic, fully parallel architecture; the iteration
// limit and syndrome-based early stop are its own choices.
module decoder_ctrl
  import ldpc_pkg::*;
#(
  parameter int MAXIT = MAX_ITER
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  frame_rdy,
  input  logic  ok,
  input  logic  out_idle,
  output logic  take,
  output logic  v_en,
  output logic  c_en,
  output logic  word_valid,
  output logic  busy,
  output iter_t iters,       // check passes of the last finished frame
  output logic  converged    // last finished frame satisfies all parity checks
);

  typedef enum logic [1:0] {IDLE, VPH, CPH, DONE} state_t;
  state_t state;
  iter_t  iter;
  logic   stop;

  assign stop       = ok || (iter == iter_t'(MAXIT));
  assign take       = (state == IDLE) && frame_rdy;
  assign v_en       = (state == VPH);
  assign c_en       = (state == CPH) && !stop;
  assign word_valid = (state == DONE) && out_idle;
  assign busy       = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      iter      <= '0;
      iters     <= '0;
      converged <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (frame_rdy) begin
          iter  <= '0;
          state <= VPH;
        end
        VPH: state <= CPH;
        CPH: if (stop) state <= DONE;
             else begin
               iter  <= iter + 1'b1;
               state <= VPH;
             end
        DONE: if (out_idle) begin
          iters     <= iter;
          converged <= ok;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  iter_bound: assert property (@(posedge clk) disable iff (!rst_n) iter <= iter_t'(MAXIT));

endmodule
