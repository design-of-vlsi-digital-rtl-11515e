// er_iir3: timing-error-tolerant 16-bit 3-parallel 2nd-order IIR filter.
//
// Three samples (in0, in1, in2) enter per clock.  The dataflow graph, its
// twelve multipliers and the kind of controller on each pipeline stage are
// taken from the source design's IIR figure; the figure prints no coefficient
// values, so C[0..11] are parameters (Q1.15) with assumed values that keep the
// loop stable.  With every stage a one-cycle register:
//
//   P6a <= in0 + C1*in1 + in2            P2a <= in1
//   P6b <= in1 + C0*in0                  P2b <= in2
//   P3b <= C2*P2b + P2a + in0
//   P4a <= P6a + C3*P6b + C4*P3b         P4b <= P6b + C5*P3b
//   y0  <= P4a + C7*y0 + C6*y1           y1  <= P4b + C8*y1 + C9*y0   (loop)
//   P2c <= P3b
//   out0 = y0, out1 = y1, out2 = P2c + C10*y1 + C11*y0
//
// Error handling (see the controller modules for the per-stage rules):
//   * loop group: y0 (feedback control) and y1 (forward + feedback control)
//     hold together; the joining stages P4a/P4b (feedback joining control) and
//     P2c (forward control, paired with the loop outputs at the out2 adder)
//     repeat their value whenever any member of the group reports a late value;
//   * input side: P2a/P2b are a forward pair, P6a/P6b a forward pair that is
//     also paired with P3b at the P4 adders; P6a/P6b follow the mode of P2a
//     one cycle later, as the later FIR taps do.
// Departures from the source: P3b, labelled as a feedback-controlled stage in
// the figure, lies on no loop in the graph and uses forward control here.  The
// raw in0 also enters the P3b adder, and it cannot be delayed.  While P2a/P2b
// are in delay mode that adder's result is therefore marked invalid, so a
// late value in P2a/P2b costs the blocks up to the next invalid input block
// instead of being corrected: they are marked invalid and the loop skips
// them, exactly as it skips invalid input blocks.  A
// correction in P3b reaches the loop one cycle after it reaches P2c; a
// one-cycle copy of P3b's stall_out (gap_p3b, this design's addition) tells
// the loop stages to keep their held copy valid so that the two paths line
// up again.
//
// Controllers whose mode no neighbour follows leave their mode output open.
//
// Interface: one block per clk, in_valid_n = 0 for a valid block; out0..out2
// with out_valid_n.  A valid input block's outputs appear three cycles later
// plus one cycle per corrected error that is still pending.
module er_iir3
  import er_pkg::*;
#(
  parameter sample_t C [12] = '{
    16'sd8192,   // C0  in0 -> P6b adder
    16'sd8192,   // C1  in1 -> P6a adder
    16'sd8192,   // C2  P2b -> P3b adder
    16'sd8192,   // C3  P6b -> P4a adder
    16'sd8192,   // C4  P3b -> P4a adder
    16'sd8192,   // C5  P3b -> P4b adder
    16'sd8192,   // C6  y1 -> y0
    16'sd16384,  // C7  y0 -> y0
    16'sd16384,  // C8  y1 -> y1
    -16'sd8192,  // C9  y0 -> y1
    16'sd8192,   // C10 y1 -> out2
    16'sd8192    // C11 y0 -> out2
  }
) (
  input  logic    clk,
  input  logic    clk_d,
  input  logic    rst_n,
  input  sample_t in0,
  input  sample_t in1,
  input  sample_t in2,
  input  logic    in_valid_n,
  output sample_t out0,
  output sample_t out1,
  output sample_t out2,
  output logic    out_valid_n
);

  // Stage outputs, error flags and control bundles.
  sample_t q_p6a, q_p6b, q_p2a, q_p2b, q_p3b, q_p4a, q_p4b, q_p2c, q_y0, q_y1;
  logic    e_p6a, e_p6b, e_p2a, e_p2b, e_p3b, e_p4a, e_p4b, e_p2c, e_y0, e_y1;
  er_ctl_t k_p6a, k_p6b, k_p2a, k_p2b, k_p3b, k_p4a, k_p4b, k_p2c, k_y0, k_y1;
  logic    v_p6a, v_p6b, v_p2a, v_p2b, v_p3b, v_p4a, v_p4b, v_p2c, v_y0, v_y1;  // valid_out_n
  logic    s_p6a, s_p6b, s_p2a, s_p2b, s_p3b, s_p4a, s_p4b, s_p2c, s_y0, s_y1;  // stall_out
  logic    m_p2a;

  // Combinational operators of the graph.
  sample_t d_p6a, d_p6b, d_p3b, d_p4a, d_p4b, d_y0, d_y1;
  logic    v_a2b, v_join, loop_stall;
  logic    gap_p3b;   // P3b corrected a late value one cycle ago

  assign d_p6a = in0 + qmul(in1, C[1]) + in2;
  assign d_p6b = in1 + qmul(in0, C[0]);
  assign d_p3b = qmul(q_p2b, C[2]) + q_p2a + in0;
  assign d_p4a = q_p6a + qmul(q_p6b, C[3]) + qmul(q_p3b, C[4]);
  assign d_p4b = q_p6b + qmul(q_p3b, C[5]);
  assign d_y0  = q_p4a + qmul(q_y0, C[7]) + qmul(q_y1, C[6]);
  assign d_y1  = q_p4b + qmul(q_y1, C[8]) + qmul(q_y0, C[9]);

  assign out0 = q_y0;
  assign out1 = q_y1;
  assign out2 = q_p2c + qmul(q_y1, C[10]) + qmul(q_y0, C[11]);

  // Validity of combined values (OR: 0 = valid).
  assign v_a2b       = v_p2a | v_p2b | in_valid_n | m_p2a;  // in0 misaligned in delay mode
  assign v_join      = v_p6a | v_p6b | v_p3b;               // what P4a/P4b/P2c take in
  assign out_valid_n = v_y0 | v_y1 | v_p2c;
  assign loop_stall  = s_y0 | s_y1 | s_p4a | s_p4b | s_p2c;

  // A correction in P3b puts one invalid value into both the loop path (via
  // P4a/P4b, one stage longer) and the out2 path (via P2c).  The loop then
  // holds its state one cycle later than P2c skips, so the held copy is the
  // one that pairs with P2c's corrected value: it must stay valid.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) gap_p3b <= 1'b0;
    else        gap_p3b <= s_p3b;

  // ---- input side -------------------------------------------------------
  er_pipe_stage u_p2a (.clk, .clk_d, .rst_n, .d(in1),   .ctl(k_p2a), .q(q_p2a), .err(e_p2a));
  er_pipe_stage u_p2b (.clk, .clk_d, .rst_n, .d(in2),   .ctl(k_p2b), .q(q_p2b), .err(e_p2b));
  er_pipe_stage u_p6a (.clk, .clk_d, .rst_n, .d(d_p6a), .ctl(k_p6a), .q(q_p6a), .err(e_p6a));
  er_pipe_stage u_p6b (.clk, .clk_d, .rst_n, .d(d_p6b), .ctl(k_p6b), .q(q_p6b), .err(e_p6b));
  er_pipe_stage u_p3b (.clk, .clk_d, .rst_n, .d(d_p3b), .ctl(k_p3b), .q(q_p3b), .err(e_p3b));

  er_forward_ctrl u_p2a_ctrl (
    .clk, .rst_n, .error(e_p2a), .valid_in1_n(in_valid_n), .valid_in2_n(in_valid_n),
    .stall_in(s_p2b), .lag_in(1'b0),
    .ctl(k_p2a), .valid_out_n(v_p2a), .stall_out(s_p2a), .mode(m_p2a)
  );
  er_forward_ctrl u_p2b_ctrl (
    .clk, .rst_n, .error(e_p2b), .valid_in1_n(in_valid_n), .valid_in2_n(in_valid_n),
    .stall_in(s_p2a), .lag_in(1'b0),
    .ctl(k_p2b), .valid_out_n(v_p2b), .stall_out(s_p2b), .mode()
  );
  er_forward_ctrl u_p6a_ctrl (
    .clk, .rst_n, .error(e_p6a), .valid_in1_n(in_valid_n), .valid_in2_n(v_a2b),
    .stall_in(s_p6b | s_p3b), .lag_in(m_p2a),
    .ctl(k_p6a), .valid_out_n(v_p6a), .stall_out(s_p6a), .mode()
  );
  er_forward_ctrl u_p6b_ctrl (
    .clk, .rst_n, .error(e_p6b), .valid_in1_n(in_valid_n), .valid_in2_n(v_a2b),
    .stall_in(s_p6a | s_p3b), .lag_in(m_p2a),
    .ctl(k_p6b), .valid_out_n(v_p6b), .stall_out(s_p6b), .mode()
  );
  er_forward_ctrl u_p3b_ctrl (
    .clk, .rst_n, .error(e_p3b), .valid_in1_n(v_a2b), .valid_in2_n(in_valid_n),
    .stall_in(s_p6a | s_p6b), .lag_in(1'b0),
    .ctl(k_p3b), .valid_out_n(v_p3b), .stall_out(s_p3b), .mode()
  );

  // ---- loop group -------------------------------------------------------
  er_pipe_stage u_p4a (.clk, .clk_d, .rst_n, .d(d_p4a), .ctl(k_p4a), .q(q_p4a), .err(e_p4a));
  er_pipe_stage u_p4b (.clk, .clk_d, .rst_n, .d(d_p4b), .ctl(k_p4b), .q(q_p4b), .err(e_p4b));
  er_pipe_stage u_p2c (.clk, .clk_d, .rst_n, .d(q_p3b), .ctl(k_p2c), .q(q_p2c), .err(e_p2c));
  er_pipe_stage u_y0  (.clk, .clk_d, .rst_n, .d(d_y0),  .ctl(k_y0),  .q(q_y0),  .err(e_y0));
  er_pipe_stage u_y1  (.clk, .clk_d, .rst_n, .d(d_y1),  .ctl(k_y1),  .q(q_y1),  .err(e_y1));

  er_fbjoin_ctrl u_p4a_ctrl (
    .clk, .rst_n, .error(e_p4a), .valid_in_n(v_join), .stall_in(loop_stall),
    .ctl(k_p4a), .valid_out_n(v_p4a), .stall_out(s_p4a), .mode()
  );
  er_fbjoin_ctrl u_p4b_ctrl (
    .clk, .rst_n, .error(e_p4b), .valid_in_n(v_join), .stall_in(loop_stall),
    .ctl(k_p4b), .valid_out_n(v_p4b), .stall_out(s_p4b), .mode()
  );
  er_forward_ctrl u_p2c_ctrl (
    .clk, .rst_n, .error(e_p2c), .valid_in1_n(v_p3b), .valid_in2_n(v_join),
    .stall_in(s_y0 | s_y1 | s_p4a | s_p4b), .lag_in(1'b0),
    .ctl(k_p2c), .valid_out_n(v_p2c), .stall_out(s_p2c), .mode()
  );
  er_feedback_ctrl #(.N_IN(2)) u_y0_ctrl (
    .clk, .rst_n, .error(e_y0), .valid_in_n({v_p4a, v_p4b}), .stall_in({s_p4a, s_p4b}),
    .fwd_stall_in(s_y1 | s_p2c | gap_p3b),
    .ctl(k_y0), .valid_out_n(v_y0), .stall_out(s_y0), .mode()
  );
  er_feedback_ctrl #(.N_IN(2)) u_y1_ctrl (
    .clk, .rst_n, .error(e_y1), .valid_in_n({v_p4a, v_p4b}), .stall_in({s_p4a, s_p4b}),
    .fwd_stall_in(s_y0 | s_p2c | gap_p3b),
    .ctl(k_y1), .valid_out_n(v_y1), .stall_out(s_y1), .mode()
  );

endmodule
