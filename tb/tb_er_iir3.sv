// tb_er_iir3: self-checking test of the timing-error-tolerant 3-parallel IIR.
//
// The reference is a cycle-level model of the filter's dataflow graph without
// any error machinery: every stage is a plain register with a validity flag,
// and the loop registers keep their state whenever a joining value is
// invalid (an invalid input block is not part of the signal).  Phase 1 checks
// the filter cycle by cycle against it.  Phase 2 emulates a late value in
// each stage that the design corrects without losing an output (P6a, P6b,
// P4a, P4b, P2c, y0, y1, P3b) by inverting one bit of its main flip-flop,
// then sends an invalid block
// to remove the added latency.  Every valid output triple must equal the next
// pending valid reference triple, with none skipped.  Corrections, loop
// holds, joining-stage repeats and absorbed invalid blocks are counted and
// must all occur.
module tb_er_iir3;
  import er_pkg::*;

  localparam int unsigned MAXT = 1000;
  localparam sample_t C [12] = '{16'sd8192, 16'sd8192, 16'sd8192, 16'sd8192, 16'sd8192,
                                 16'sd8192, 16'sd8192, 16'sd16384, 16'sd16384, -16'sd8192,
                                 16'sd8192, 16'sd8192};

  logic clk = 1'b0, rst_n = 1'b0;
  wire  clk_d = clk;
  sample_t in0 = '0, in1 = '0, in2 = '0, out0, out1, out2;
  logic in_valid_n = 1'b0, out_valid_n;

  er_iir3 dut (.clk, .clk_d, .rst_n, .in0, .in1, .in2, .in_valid_n,
               .out0, .out1, .out2, .out_valid_n);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_corr = 0, n_hold = 0, n_repeat = 0, n_absorb = 0;

  // Reference model state.
  sample_t r_p6a = '0, r_p6b = '0, r_p2a = '0, r_p2b = '0, r_p3b = '0;
  sample_t r_p4a = '0, r_p4b = '0, r_p2c = '0, r_y0 = '0, r_y1 = '0;
  logic    w_p6a = 0, w_p6b = 0, w_p2a = 0, w_p2b = 0, w_p3b = 0, w_p4a = 0, w_p4b = 0, w_p2c = 0;
  logic    r_rep = 0;
  sample_t g0 [MAXT], g1 [MAXT], g2 [MAXT];
  logic    gv [MAXT];
  int      t = 0, p = 0;
  bit      exact = 1'b0;

  // The reference output shown now.
  task automatic ref_record();
    g0[t] = r_y0; g1[t] = r_y1;
    g2[t] = r_p2c + qmul(r_y1, C[10]) + qmul(r_y0, C[11]);
    gv[t] = !r_rep && !w_p2c;
  endtask

  // Advance the reference by one block.
  task automatic ref_step(sample_t a0, sample_t a1, sample_t a2, logic iv_n);
    sample_t n_p6a, n_p6b, n_p3b, n_p4a, n_p4b, n_y0, n_y1;
    logic join_n;
    n_p6a = a0 + qmul(a1, C[1]) + a2;
    n_p6b = a1 + qmul(a0, C[0]);
    n_p3b = qmul(r_p2b, C[2]) + r_p2a + a0;
    n_p4a = r_p6a + qmul(r_p6b, C[3]) + qmul(r_p3b, C[4]);
    n_p4b = r_p6b + qmul(r_p3b, C[5]);
    n_y0  = r_p4a + qmul(r_y0, C[7]) + qmul(r_y1, C[6]);
    n_y1  = r_p4b + qmul(r_y1, C[8]) + qmul(r_y0, C[9]);
    join_n = w_p6a | w_p6b | w_p3b;
    r_rep = w_p4a | w_p4b;
    if (!r_rep) begin r_y0 = n_y0; r_y1 = n_y1; end
    r_p2c = r_p3b; w_p2c = w_p3b;
    r_p4a = n_p4a; r_p4b = n_p4b; w_p4a = join_n; w_p4b = join_n;
    r_p3b = n_p3b; w_p3b = w_p2a | w_p2b | iv_n;
    r_p6a = n_p6a; r_p6b = n_p6b; w_p6a = iv_n; w_p6b = iv_n;
    r_p2a = a1; r_p2b = a2; w_p2a = iv_n; w_p2b = iv_n;
  endtask

  task automatic step(bit bubble = 1'b0);
    sample_t a0, a1, a2;
    @(negedge clk);
    ref_record();
    if (exact) begin
      checks++;
      if (out_valid_n != !gv[t] || (gv[t] && (out0 != g0[t] || out1 != g1[t] || out2 != g2[t]))) begin
        failures++;
        $display("FAIL exact t=%0d dut=%0d,%0d,%0d v_n=%0b ref=%0d,%0d,%0d v=%0b",
                 t, out0, out1, out2, out_valid_n, g0[t], g1[t], g2[t], gv[t]);
      end
      p = t + 1;
    end else if (!out_valid_n) begin
      int idx = -1;
      checks++;
      for (int k = p; k <= t && k < p + 12; k++)
        if (gv[k] && g0[k] == out0 && g1[k] == out1 && g2[k] == out2) begin idx = k; break; end
      if (idx < 0) begin
        failures++;
        $display("FAIL t=%0d valid output %0d,%0d,%0d matches no pending reference (p=%0d)",
                 t, out0, out1, out2, p);
      end else begin
        for (int k = p; k < idx; k++) if (gv[k]) begin
          failures++;
          $display("FAIL t=%0d reference output %0d skipped", t, k);
        end
        p = idx + 1;
      end
    end
    a0 = sample_t'($urandom); a1 = sample_t'($urandom); a2 = sample_t'($urandom);
    in0 = a0; in1 = a1; in2 = a2; in_valid_n = bubble;
    ref_step(a0, a1, a2, bubble);
    t++;
  endtask

  `define ER_FLIP(path) begin logic v; v = path; force path = ~v; release path; end
  task automatic inject(int which);
    @(posedge clk); #1;
    case (which)
      0: `ER_FLIP(dut.u_p6a.g_cell[5].u_cell.main_q)
      1: `ER_FLIP(dut.u_p6b.g_cell[5].u_cell.main_q)
      2: `ER_FLIP(dut.u_p4a.g_cell[5].u_cell.main_q)
      3: `ER_FLIP(dut.u_p4b.g_cell[5].u_cell.main_q)
      4: `ER_FLIP(dut.u_p2c.g_cell[5].u_cell.main_q)
      5: `ER_FLIP(dut.u_y0.g_cell[5].u_cell.main_q)
      6: `ER_FLIP(dut.u_y1.g_cell[5].u_cell.main_q)
      7: `ER_FLIP(dut.u_p3b.g_cell[5].u_cell.main_q)
      default: ;
    endcase
  endtask

  always @(posedge clk) if (rst_n) begin
    n_corr += int'(dut.e_p6a && !dut.k_p6a.sel2) + int'(dut.e_p6b && !dut.k_p6b.sel2)
            + int'(dut.e_p3b && !dut.k_p3b.sel2) + int'(dut.e_p4a && !dut.k_p4a.sel2)
            + int'(dut.e_p4b && !dut.k_p4b.sel2) + int'(dut.e_p2c && !dut.k_p2c.sel2)
            + int'(dut.e_y0 && !dut.k_y0.sel2) + int'(dut.e_y1 && !dut.k_y1.sel2);
    if (dut.k_y0.en) n_hold++;
    if (dut.loop_stall && !dut.k_p4a.sel2) n_repeat++;
    if (dut.k_p4a.sel2 && dut.u_p4a_ctrl.tag_main_n) n_absorb++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    exact = 1'b1;
    repeat (30) step();
    step(1'b1);              // an invalid block: the loop must hold
    repeat (10) step();
    exact = 1'b0;
    for (int s = 0; s < 8; s++) begin
      fork inject(s); join_none
      repeat (6) step();
      step(1'b1);
      repeat (14) step();
    end
    exact = 1'b1;
    repeat (20) step();
    checks++;
    if (n_corr < 7 || n_hold < 2 || n_repeat < 1 || n_absorb < 1) begin
      failures++;
      $display("FAIL mechanism counts: corr=%0d hold=%0d repeat=%0d absorb=%0d",
               n_corr, n_hold, n_repeat, n_absorb);
    end
    $display("corrections=%0d loop_holds=%0d join_repeats=%0d absorbs=%0d",
             n_corr, n_hold, n_repeat, n_absorb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
