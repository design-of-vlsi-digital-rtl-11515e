// er_fbjoin_ctrl: control circuit of the stage that feeds new values into a
// feedback loop (the "feedback joining" stage).
//
// When the loop stage (er_feedback_ctrl) catches a late value it re-runs one
// iteration, so the value this stage offers must be offered again in the next
// cycle: on stall_in the stage enters delay mode, marks the current value
// invalid and repeats it from the buffer flip-flop.  A late value caught by
// this stage itself is handled as in er_regular_ctrl (invalid now, corrected
// value next cycle); stall_out reports it to the loop stage.  Delay mode ends
// when an invalid value arrives, which is skipped.
// Ports and the stall handshake follow the source design; the exit rule is
// this design's own choice.
//
// Limitation: a stall_in that arrives while already in delay mode cannot be
// absorbed (there is a single buffer flip-flop); the value then in the main
// flip-flop is lost.
// Timing: valid_out_n and stall_out are combinational from err and stall_in.
module er_fbjoin_ctrl
  import er_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    error,
  input  logic    valid_in_n,
  input  logic    stall_in,
  output er_ctl_t ctl,
  output logic    valid_out_n,
  output logic    stall_out,
  output logic    mode
);

  logic tag_main_n, tag_buf_n, mode_next;

  always_comb begin
    if (mode) mode_next = !tag_main_n;
    else      mode_next = error | stall_in;
    ctl.sel1    = error;
    ctl.sel2    = mode;
    // A repeat request in delay mode keeps the buffered value.
    ctl.en      = mode_next & !(mode & stall_in);
    stall_out   = !mode & error;
    valid_out_n = mode ? tag_buf_n : (tag_main_n | error | stall_in);
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
