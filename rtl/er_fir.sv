// er_fir: timing-error-tolerant 16-bit low-pass FIR filter (transposed form).
//
//   y[n] = h0 x[n-1] + h1 x[n-2] + h2 x[n-3] + h3 x[n-4]
//        + h2 x[n-5] + h1 x[n-6] + h0 x[n-7]
//
// Structure (as in the source design's FIR figure): the input enters a
// stage P1 (regular control) and is multiplied by h0; an accumulation line of
// six forward-controlled stages m1..m6 adds one product per stage.  Each adder
// also takes a product of the input held in its own forward-controlled branch
// stage b1..b6, whose coefficients are h1 h2 h3 h2 h1 h0.  The last adder
// drives the output directly.  Every adder pairs the stages m_i and b_i: they
// exchange stall signals and the validity of their incoming values, and the
// validity of a sum is the OR of the pair's valid_out_n.
//
// A late value caught anywhere raises one invalid output and adds one cycle
// of latency to the affected paths; an invalid input sample removes it again.
// Because the branch stages all see the input at once while the accumulation
// line is a pipeline, a change of latency at pair i (or at P1) must reach the
// branch stage of pair i+1 one cycle later: b(i+1) follows the mode of b(i)
// (b1 follows P1) through its lag_in input.  That lag propagation is this
// design's own addition; the stage/controller assignment follows the source.
//
// Arithmetic: samples and coefficients are signed 16-bit, coefficients Q1.15;
// each product keeps bits [30:15] and sums wrap at 16 bits (this design's
// choice; the source gives only the 16-bit width).  The coefficients are
// parameters with an assumed symmetric low-pass set (sum of taps = 1.0).
//
// Controllers whose mode no neighbour follows leave their mode output open.
//
// Interface: one sample per clk on in/in_valid_n (0 = valid); out/out_valid_n
// show y one cycle after the newest sample was presented, plus one cycle for
// each latency step added by a corrected error.  clk_d is clk delayed by a
// fraction of a cycle (tie to clk in zero-delay simulation).
module er_fir
  import er_pkg::*;
#(
  parameter sample_t H0 = 16'sd983,
  parameter sample_t H1 = 16'sd3277,
  parameter sample_t H2 = 16'sd6554,
  parameter sample_t H3 = 16'sd11141
) (
  input  logic    clk,
  input  logic    clk_d,
  input  logic    rst_n,
  input  sample_t in,
  input  logic    in_valid_n,
  output sample_t out,
  output logic    out_valid_n
);

  localparam int unsigned NT = 6;  // adders on the accumulation line

  // Branch coefficients b1..b6, read off the filter figure.
  localparam sample_t BC [NT] = '{H1, H2, H3, H2, H1, H0};

  // Regular stage P1.
  sample_t p1_q;
  logic    p1_err, p1_vo_n, p1_mode;
  er_ctl_t p1_ctl;

  er_pipe_stage u_p1 (.clk, .clk_d, .rst_n, .d(in), .ctl(p1_ctl), .q(p1_q), .err(p1_err));
  er_regular_ctrl u_p1_ctrl (
    .clk, .rst_n, .error(p1_err), .valid_in_n(in_valid_n),
    .ctl(p1_ctl), .valid_out_n(p1_vo_n), .mode(p1_mode)
  );

  // Accumulation line m[i] and branch stages b[i], i = 0..NT-1 for m1..m6, b1..b6.
  sample_t m_d [NT], m_q [NT], b_q [NT], sum [NT];
  logic    m_err [NT], b_err [NT];
  er_ctl_t m_ctl [NT], b_ctl [NT];
  logic    m_vin_n [NT], m_vo_n [NT], b_vo_n [NT], sum_v_n [NT];
  logic    m_stall [NT], b_stall [NT], b_mode [NT], b_lag [NT];

  assign m_d[0]     = qmul(p1_q, H0);
  assign m_vin_n[0] = p1_vo_n;
  assign b_lag[0]   = p1_mode;

  for (genvar i = 0; i < NT; i++) begin : g_tap
    if (i > 0) begin : g_link
      assign m_d[i]     = sum[i-1];
      assign m_vin_n[i] = sum_v_n[i-1];
      assign b_lag[i]   = b_mode[i-1];
    end

    er_pipe_stage u_m (.clk, .clk_d, .rst_n, .d(m_d[i]), .ctl(m_ctl[i]), .q(m_q[i]), .err(m_err[i]));
    er_forward_ctrl u_m_ctrl (
      .clk, .rst_n, .error(m_err[i]),
      .valid_in1_n(m_vin_n[i]), .valid_in2_n(in_valid_n),
      .stall_in(b_stall[i]), .lag_in(1'b0),
      .ctl(m_ctl[i]), .valid_out_n(m_vo_n[i]), .stall_out(m_stall[i]), .mode()
    );

    er_pipe_stage u_b (.clk, .clk_d, .rst_n, .d(in), .ctl(b_ctl[i]), .q(b_q[i]), .err(b_err[i]));
    er_forward_ctrl u_b_ctrl (
      .clk, .rst_n, .error(b_err[i]),
      .valid_in1_n(in_valid_n), .valid_in2_n(m_vin_n[i]),
      .stall_in(m_stall[i]), .lag_in(b_lag[i]),
      .ctl(b_ctl[i]), .valid_out_n(b_vo_n[i]), .stall_out(b_stall[i]), .mode(b_mode[i])
    );

    assign sum[i]     = m_q[i] + qmul(b_q[i], BC[i]);
    assign sum_v_n[i] = m_vo_n[i] | b_vo_n[i];
  end

  assign out         = sum[NT-1];
  assign out_valid_n = sum_v_n[NT-1];

endmodule
