// er_feedback_ctrl: control circuit of a stage inside a feedback loop.
//
// The stage holds the loop state, so it must never skip or repeat an
// iteration.  Whenever the loop cannot take a correct step this cycle it
// "holds": the buffer flip-flop keeps the current state (the delay flip-flop's
// copy if the stage itself caught a late value) and the stage shows it for
// one more cycle while the main flip-flop's result is thrown away.  It holds
// when
//   * its own err is high (the state shown now is wrong: valid_out_n is raised
//     and the corrected state, shown next cycle, is valid);
//   * a value joining the loop this cycle is invalid (valid_in_n) or a joining
//     stage reports a late value (stall_in): the state is right but the step
//     is not, so the repeated state is marked invalid instead;
//   * a forward partner (a stage whose output is combined with this one's,
//     such as the other state register of a coupled loop) reports a late
//     value (fwd_stall_in): the partner's current value is invalid and its
//     corrected copy comes next, so both copies of this state keep valid
//     flags and the pair stays aligned.  With fwd_stall_in this is the
//     combined forward + feedback control circuit.
// stall_out tells the joining stages (er_fbjoin_ctrl) to offer their value once
// more.  The stage returns to normal mode after the first cycle in which all
// joining values are valid.
// Ports and the stall handshake follow the source design; the hold rules and
// the valid marking are this design's own choices.
//
// Parameters: N_IN joining streams (valid_in_n and stall_in bits).
// Timing: valid_out_n and stall_out are combinational from err.
module er_feedback_ctrl
  import er_pkg::*;
#(
  parameter int unsigned N_IN = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            error,
  input  logic [N_IN-1:0] valid_in_n,
  input  logic [N_IN-1:0] stall_in,
  input  logic            fwd_stall_in,
  output er_ctl_t         ctl,
  output logic            valid_out_n,
  output logic            stall_out,
  output logic            mode
);

  logic tag_buf_n, step_bad, mode_next;

  always_comb begin
    step_bad    = (|valid_in_n) | (|stall_in) | fwd_stall_in;
    mode_next   = mode ? step_bad : (error | step_bad);
    ctl.sel1    = error;
    ctl.sel2    = mode;
    ctl.en      = !mode & mode_next;  // capture once, then keep
    stall_out   = !mode & error;
    valid_out_n = mode ? tag_buf_n : error;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mode      <= 1'b0;
      tag_buf_n <= 1'b0;
    end else begin
      mode <= mode_next;
      if (ctl.en)    tag_buf_n <= !(error | fwd_stall_in);  // repeat invalid, corrected copy valid
      else if (mode) tag_buf_n <= 1'b1;    // held again: a repeat
    end

endmodule
