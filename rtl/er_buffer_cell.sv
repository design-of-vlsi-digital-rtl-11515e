// er_buffer_cell: one bit of a timing-error-tolerant pipeline buffer.
//
// Three flip-flops.  The main flip-flop samples d on clk; the delay flip-flop
// samples d on clk_d, a copy of clk delayed by a fraction of a cycle, so it
// still catches a value that reached d too late for clk.  An XOR of the two
// raises err when they disagree.  MUX1 (ctl.sel1) chooses which of the two
// feeds the buffer flip-flop, which loads only while ctl.en is high; MUX2
// (ctl.sel2) chooses whether q shows the main or the buffer flip-flop.  This
// is the structure of the one-bit buffer of the source design.
//
// Design choices: the buffer flip-flop's gated clock (enable AND clk) is written
// as a clock enable on clk, which is what a glitch-free integrated clock gate
// gives.  All three flip-flops clear on rst_n (asynchronous, active low).
//
// Timing: q and err are valid one clk edge after d was sampled.  err is only
// meaningful when sampled at the next rising edge of clk, after clk_d has
// fired.  In a zero-delay RTL simulation clk_d is tied to clk (no path is ever
// late) and a timing error is emulated by disturbing main_q.
module er_buffer_cell
  import er_pkg::*;
(
  input  logic    clk,
  input  logic    clk_d,
  input  logic    rst_n,
  input  logic    d,
  input  er_ctl_t ctl,
  output logic    q,
  output logic    err
);

  logic main_q, delay_q, buf_q, mux1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) main_q <= 1'b0;
    else        main_q <= d;

  always_ff @(posedge clk_d or negedge rst_n)
    if (!rst_n) delay_q <= 1'b0;
    else        delay_q <= d;

  assign mux1 = ctl.sel1 ? delay_q : main_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      buf_q <= 1'b0;
    else if (ctl.en) buf_q <= mux1;

  assign err = main_q ^ delay_q;
  assign q   = ctl.sel2 ? buf_q : main_q;

endmodule
