// tb_er_fir: self-checking test of the timing-error-tolerant FIR filter.
//
// A reference model computes y[t] from the recorded input samples with the
// same fixed-point rules (Q1.15 products keeping bits [30:15], 16-bit wrap).
// Phase 1 streams valid samples with no errors and checks every output
// against y at the exact one-cycle latency.  Phase 2 emulates a late value in
// each of the 13 stages in turn (P1, m1..m6, b1..b6) by inverting one bit of
// the stage's main flip-flop right after it was loaded (clk_d is tied to clk,
// so the delay flip-flop keeps the correct value), then feeds an invalid
// sample so that the added latency is removed.  Every output marked valid
// must equal the next not-yet-seen valid reference output, with none
// skipped.  The test counts corrections, stalls between paired stages, lag
// inheritance by later branch stages and absorbed invalid samples, and fails
// if any of them never happened or if a stage is still in delay mode at the end.
module tb_er_fir;
  import er_pkg::*;

  localparam sample_t H0 = 16'sd983, H1 = 16'sd3277, H2 = 16'sd6554, H3 = 16'sd11141;
  localparam int unsigned MAXT = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  wire  clk_d = clk;
  sample_t in = '0, out;
  logic in_valid_n = 1'b0, out_valid_n;

  er_fir dut (.clk, .clk_d, .rst_n, .in, .in_valid_n, .out, .out_valid_n);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_corr = 0, n_stall = 0, n_inherit = 0, n_absorb = 0;

  sample_t xs [MAXT];
  logic    xv_n [MAXT];
  int      t = 0;       // index of the sample being presented
  int      p = 0;       // next reference index the output may match
  bit      exact = 1'b0;

  function automatic sample_t ref_y(int k);
    sample_t c [7] = '{H0, H1, H2, H3, H2, H1, H0};
    sample_t s = '0;
    for (int j = 0; j < 7; j++) if (k >= j) s += qmul(xs[k-j], c[j]);  // zeros before start
    return s;
  endfunction

  function automatic bit ref_valid(int k);
    for (int j = 0; j < 7; j++) if (k >= j && xv_n[k-j]) return 1'b0;
    return 1'b1;
  endfunction

  // Drive a new sample after each falling edge, check at the falling edge.
  task automatic step(bit bubble = 1'b0);
    @(negedge clk);
    // Check the output produced for the sample of the previous cycle.
    if (rst_n && t > 0) begin
      if (exact) begin
        checks++;
        if (out_valid_n != !ref_valid(t-1) || (ref_valid(t-1) && out != ref_y(t-1))) begin
          failures++;
          $display("FAIL exact t=%0d out=%0d v_n=%0b ref=%0d", t-1, out, out_valid_n, ref_y(t-1));
        end
        p = t;
      end else if (!out_valid_n) begin
        int idx = -1;
        checks++;
        for (int k = p; k < t && k < p + 12; k++)
          if (ref_valid(k) && ref_y(k) == out) begin idx = k; break; end
        if (idx < 0) begin
          failures++;
          $display("FAIL t=%0d valid output %0d matches no pending reference (p=%0d)", t, out, p);
        end else begin
          for (int k = p; k < idx; k++) if (ref_valid(k)) begin
            failures++;
            $display("FAIL t=%0d reference output %0d skipped", t, k);
          end
          p = idx + 1;
        end
      end
    end
    xs[t]   = sample_t'($urandom);
    xv_n[t] = bubble;
    in         = xs[t];
    in_valid_n = bubble;
    t++;
  endtask

  // Invert bit 3 of a stage's main flip-flop just after a rising edge.
  `define ER_FLIP(path) begin logic v; v = path; force path = ~v; release path; end
  task automatic inject(int which);
    @(posedge clk); #1;
    case (which)
      0:  `ER_FLIP(dut.u_p1.g_cell[3].u_cell.main_q)
      1:  `ER_FLIP(dut.g_tap[0].u_m.g_cell[3].u_cell.main_q)
      2:  `ER_FLIP(dut.g_tap[1].u_m.g_cell[3].u_cell.main_q)
      3:  `ER_FLIP(dut.g_tap[2].u_m.g_cell[3].u_cell.main_q)
      4:  `ER_FLIP(dut.g_tap[3].u_m.g_cell[3].u_cell.main_q)
      5:  `ER_FLIP(dut.g_tap[4].u_m.g_cell[3].u_cell.main_q)
      6:  `ER_FLIP(dut.g_tap[5].u_m.g_cell[3].u_cell.main_q)
      7:  `ER_FLIP(dut.g_tap[0].u_b.g_cell[3].u_cell.main_q)
      8:  `ER_FLIP(dut.g_tap[1].u_b.g_cell[3].u_cell.main_q)
      9:  `ER_FLIP(dut.g_tap[2].u_b.g_cell[3].u_cell.main_q)
      10: `ER_FLIP(dut.g_tap[3].u_b.g_cell[3].u_cell.main_q)
      11: `ER_FLIP(dut.g_tap[4].u_b.g_cell[3].u_cell.main_q)
      12: `ER_FLIP(dut.g_tap[5].u_b.g_cell[3].u_cell.main_q)
      default: ;
    endcase
  endtask

  // Event counters, sampled at every rising edge.
  logic [5:0] inh_prev = '0;
  always @(posedge clk) if (rst_n) begin
    if (dut.p1_err && !dut.p1_mode) n_corr++;
    for (int i = 0; i < 6; i++) begin
      if (dut.m_err[i] && !dut.m_ctl[i].sel2) n_corr++;
      if (dut.b_err[i] && !dut.b_ctl[i].sel2) n_corr++;
      if (dut.m_stall[i] || dut.b_stall[i]) n_stall++;
      if (dut.b_lag[i] && !inh_prev[i]) n_inherit++;
      inh_prev[i] = dut.b_lag[i];
    end
    if (dut.p1_mode && dut.u_p1_ctrl.tag_main_n) n_absorb++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    exact = 1'b1;
    repeat (40) step();
    exact = 1'b0;
    for (int s = 0; s <= 12; s++) begin
      fork inject(s); join_none
      repeat (6) step();
      step(1'b1);           // invalid sample absorbs the extra cycle
      repeat (14) step();
    end
    // Latency must be back to one cycle: exact checking again.
    exact = 1'b1;
    repeat (2) step();
    exact = 1'b1;
    repeat (20) step();
    checks++;
    if (n_corr < 13 || n_stall < 12 || n_inherit < 1 || n_absorb < 1) begin
      failures++;
      $display("FAIL mechanism counts: corr=%0d stall=%0d inherit=%0d absorb=%0d",
               n_corr, n_stall, n_inherit, n_absorb);
    end
    $display("corrections=%0d stalls=%0d lag_inherits=%0d p1_absorbs=%0d",
             n_corr, n_stall, n_inherit, n_absorb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
