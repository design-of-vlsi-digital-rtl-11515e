// er_pipe_stage: a W-bit timing-error-tolerant pipeline buffer (one stage).
//
// W er_buffer_cell instances share one control bundle from the stage's
// controller; their error bits are OR'ed into a single err, which tells the
// controller that some bit of this stage caught a late value.  This is how the
// source design builds a stage out of one-bit buffers.
//
// Timing: q follows d by one clk edge (main path) or two (delay mode, when
// ctl.sel2 = 1).  err is combinational from the flip-flops of this stage.
module er_pipe_stage
  import er_pkg::*;
#(
  parameter int unsigned W = SAMPLE_W
) (
  input  logic         clk,
  input  logic         clk_d,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  er_ctl_t      ctl,
  output logic [W-1:0] q,
  output logic         err
);

  logic [W-1:0] bit_err;

  for (genvar i = 0; i < W; i++) begin : g_cell
    er_buffer_cell u_cell (
      .clk, .clk_d, .rst_n,
      .d   (d[i]),
      .ctl,
      .q   (q[i]),
      .err (bit_err[i])
    );
  end

  assign err = |bit_err;

endmodule
