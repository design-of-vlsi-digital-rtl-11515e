// er_forward_ctrl: control circuit of one of two stages whose outputs are
// combined in the same operator (a "forward" join).
//
// Both stages of the pair must always be in the same mode, or the operator
// would combine values of different time steps.  Besides the behaviour of
// er_regular_ctrl the controller therefore
//   * raises stall_out when its own stage catches a late value, and enters
//     delay mode when stall_in (the partner's stall_out) is high, so the pair
//     switches together;
//   * samples valid_in2_n, the validity of the value entering the partner, and
//     leaves delay mode when either value of the pair entering now is invalid,
//     so the pair also leaves together (the value combined from the skipped
//     pair would have been invalid anyway);
//   * follows lag_in, one cycle later, when the other operand of its partner's
//     join comes from a longer pipeline whose latency was raised by one
//     cycle upstream (for instance the later taps of a transposed FIR).  Such
//     an inherited delay mode ends when lag_in falls again.  Tie lag_in to 0
//     where it does not apply.
// Ports, the stall handshake and the valid-in1/valid-in2 inputs follow the
// source design; leaving delay mode on an invalid value and the lag_in input
// are this design's own choices.
//
// Limitation: one stage has one buffer flip-flop, so it can add at most one
// cycle.  A second latency-raising event on the same path before an invalid
// value has been absorbed is not handled.
// Timing: valid_out_n and stall_out are combinational from err and stall_in.
module er_forward_ctrl
  import er_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    error,
  input  logic    valid_in1_n,
  input  logic    valid_in2_n,
  input  logic    stall_in,
  input  logic    lag_in,
  output er_ctl_t ctl,
  output logic    valid_out_n,
  output logic    stall_out,
  output logic    mode
);

  logic own_q, inh_q, own_next, mode_next;
  logic tag1_n, tag2_n, tag_buf_n;

  assign mode = own_q | inh_q;

  always_comb begin
    if (mode) own_next = own_q & !(tag1_n | tag2_n);
    else      own_next = error | stall_in;
    mode_next   = own_next | lag_in;
    ctl.sel1    = error;
    ctl.sel2    = mode;
    ctl.en      = mode_next;
    stall_out   = !mode & error;
    // A value caught late is marked invalid; its corrected copy follows.  A
    // value repeated because of stall_in or lag_in keeps its flag: the value
    // it is combined with is invalid in one of the two cycles.
    valid_out_n = mode ? tag_buf_n : (tag1_n | error);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      own_q     <= 1'b0;
      inh_q     <= 1'b0;
      tag1_n    <= 1'b0;
      tag2_n    <= 1'b0;
      tag_buf_n <= 1'b0;
    end else begin
      own_q  <= own_next;
      inh_q  <= lag_in;
      tag1_n <= valid_in1_n;
      tag2_n <= valid_in2_n;
      if (ctl.en) tag_buf_n <= tag1_n;
    end

endmodule
