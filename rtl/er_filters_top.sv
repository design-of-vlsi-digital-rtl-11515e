// er_filters_top: the two timing-error-tolerant example filters side by side.
//
// The FIR (er_fir: one sample per clock, seven symmetric taps) and the
// 3-parallel 2nd-order IIR (er_iir3: three samples per clock) are independent
// designs built from the same error-tolerant pipeline stages and controllers;
// they share only the clock pair and the reset.  Each keeps its own sample
// ports with an active-low valid flag (0 = valid).
//
// Clocks: clk is the main clock; clk_d is the same clock delayed by a
// fraction of a cycle (for example three quarters), generated outside this
// design.  In zero-delay RTL simulation tie clk_d to clk.
module er_filters_top
  import er_pkg::*;
(
  input  logic    clk,
  input  logic    clk_d,
  input  logic    rst_n,
  // FIR
  input  sample_t fir_in,
  input  logic    fir_in_valid_n,
  output sample_t fir_out,
  output logic    fir_out_valid_n,
  // IIR
  input  sample_t iir_in0,
  input  sample_t iir_in1,
  input  sample_t iir_in2,
  input  logic    iir_in_valid_n,
  output sample_t iir_out0,
  output sample_t iir_out1,
  output sample_t iir_out2,
  output logic    iir_out_valid_n
);

  er_fir u_fir (
    .clk, .clk_d, .rst_n,
    .in(fir_in), .in_valid_n(fir_in_valid_n),
    .out(fir_out), .out_valid_n(fir_out_valid_n)
  );

  er_iir3 u_iir (
    .clk, .clk_d, .rst_n,
    .in0(iir_in0), .in1(iir_in1), .in2(iir_in2), .in_valid_n(iir_in_valid_n),
    .out0(iir_out0), .out1(iir_out1), .out2(iir_out2), .out_valid_n(iir_out_valid_n)
  );

endmodule
