// er_regular_ctrl: control circuit of a stage on a plain linear datapath.
//
// The stage runs in one of two modes.  In normal mode the stage output is the
// main flip-flop and the buffer flip-flop is idle.  When the stage's err is
// high the value now on the output is wrong: valid_out_n is raised for this
// cycle, the buffer flip-flop loads the delay flip-flop's (correct) copy, and
// from the next cycle the stage shows the buffer flip-flop (delay mode).  The
// corrected value therefore appears one cycle late, right after an invalid one.
// In delay mode every value passes through the buffer flip-flop, taken from
// the delay flip-flop whenever err is high, so further late arrivals are
// masked without another invalid cycle.  The stage leaves delay mode when an
// invalid value reaches its main flip-flop: that value is skipped, which
// removes the extra cycle of latency again.
//
// The two-mode behaviour, the invalid marking and the error-to-buffer path
// follow the source design; the rule for leaving delay mode (absorbing an
// invalid value) is this design's own choice, as is the reset state (normal
// mode, all values valid).
//
// Interface: valid_in_n is the upstream stage's valid_out_n, sampled together
// with the data (0 = valid).  mode is 1 while the stage is in delay mode.
// Timing: one clk per value; valid_out_n is combinational from err.
module er_regular_ctrl
  import er_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    error,
  input  logic    valid_in_n,
  output er_ctl_t ctl,
  output logic    valid_out_n,
  output logic    mode
);

  logic tag_main_n, tag_buf_n, mode_next;

  always_comb begin
    if (mode) mode_next = !tag_main_n;  // skip an invalid value to leave delay mode
    else      mode_next = error;
    ctl.sel1    = error;
    ctl.sel2    = mode;
    ctl.en      = mode_next;
    valid_out_n = mode ? tag_buf_n : (tag_main_n | error);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mode       <= 1'b0;
      tag_main_n <= 1'b0;
      tag_buf_n  <= 1'b0;
    end else begin
      mode       <= mode_next;
      tag_main_n <= valid_in_n;
      if (ctl.en) tag_buf_n <= tag_main_n;
    end

endmodule
