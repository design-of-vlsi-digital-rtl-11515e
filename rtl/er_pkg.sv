// er_pkg: types and constants shared by the timing-error-resilient filter blocks.
//
// er_ctl_t is the bundle a stage controller drives into every one-bit buffer of
// its pipeline stage: sel1 steers MUX1 (1 = take the delay flip-flop), sel2
// steers MUX2 (1 = output the buffer flip-flop, i.e. the stage is in delay
// mode) and en enables the buffer flip-flop.  Validity flags are active low
// throughout ("0 = valid"), so that the validity of a value formed from two
// streams is the OR of their flags.
package er_pkg;

  // Width of the filter samples and coefficients (both example filters are 16-bit).
  localparam int unsigned SAMPLE_W = 16;
  // Coefficient fraction bits: coefficients are signed Q1.15.
  localparam int unsigned COEF_FRAC = 15;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    logic sel1;  // MUX1: 0 = main flip-flop, 1 = delay flip-flop
    logic sel2;  // MUX2: 0 = main flip-flop, 1 = buffer flip-flop
    logic en;    // buffer flip-flop enable (clock gate)
  } er_ctl_t;

  // Fixed-point multiply used by both filters: full product, arithmetic shift
  // by COEF_FRAC, keep SAMPLE_W bits (wrap-around).
  function automatic sample_t qmul(sample_t x, sample_t c);
    logic signed [2*SAMPLE_W-1:0] p;
    p = x * c;
    return sample_t'(p >>> COEF_FRAC);
  endfunction

endpackage
