// tb_er_filters_top: end-to-end test of both error-tolerant filters, with the
// top at its default parameters.
//
// The FIR and the IIR stream random samples at the same time.  Each has a
// reference model (the FIR as a sum of products over the recorded input, the
// IIR as a cycle-level model of its graph with plain registers).  The run
// starts error-free with exact cycle-by-cycle checks, then emulates late
// values by inverting one bit of a main flip-flop: in every FIR stage and in
// the IIR stages P6a, P6b, P4a, P4b, P2c, y0, y1 and P3b, each followed by an
// invalid input that removes the added latency.  Every output flagged valid
// must equal the next pending valid reference output with none skipped;
// afterwards both filters must be back to their error-free latency.  Each
// mechanism of the design is counted and must occur: corrections, stalls
// between paired stages, lag inheritance, skipped invalid values, loop holds,
// repeats by the joining stages and forward-partner stalls of the loop.
module tb_er_filters_top;
  import er_pkg::*;

  localparam int unsigned MAXT = 1200;
  localparam sample_t H0 = 16'sd983, H1 = 16'sd3277, H2 = 16'sd6554, H3 = 16'sd11141;
  localparam sample_t C [12] = '{16'sd8192, 16'sd8192, 16'sd8192, 16'sd8192, 16'sd8192,
                                 16'sd8192, 16'sd8192, 16'sd16384, 16'sd16384, -16'sd8192,
                                 16'sd8192, 16'sd8192};

  logic clk = 1'b0, rst_n = 1'b0;
  wire  clk_d = clk;
  sample_t fir_in = '0, fir_out, iir_in0 = '0, iir_in1 = '0, iir_in2 = '0;
  sample_t iir_out0, iir_out1, iir_out2;
  logic fir_in_valid_n = 1'b0, fir_out_valid_n, iir_in_valid_n = 1'b0, iir_out_valid_n;

  er_filters_top dut (.clk, .clk_d, .rst_n, .fir_in, .fir_in_valid_n, .fir_out, .fir_out_valid_n,
                      .iir_in0, .iir_in1, .iir_in2, .iir_in_valid_n,
                      .iir_out0, .iir_out1, .iir_out2, .iir_out_valid_n);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int t = 0, fp = 0, ip = 0;
  bit exact = 1'b0;

  // ---------------- FIR reference ----------------
  sample_t xs [MAXT];
  logic    xv_n [MAXT];

  function automatic sample_t fir_ref(int k);
    sample_t c [7] = '{H0, H1, H2, H3, H2, H1, H0};
    sample_t s = '0;
    for (int j = 0; j < 7; j++) if (k >= j) s += qmul(xs[k-j], c[j]);
    return s;
  endfunction

  function automatic bit fir_ref_valid(int k);
    for (int j = 0; j < 7; j++) if (k >= j && xv_n[k-j]) return 1'b0;
    return 1'b1;
  endfunction

  // ---------------- IIR reference ----------------
  sample_t r_p6a = '0, r_p6b = '0, r_p2a = '0, r_p2b = '0, r_p3b = '0;
  sample_t r_p4a = '0, r_p4b = '0, r_p2c = '0, r_y0 = '0, r_y1 = '0;
  logic    w_p6a = 0, w_p6b = 0, w_p2a = 0, w_p2b = 0, w_p3b = 0, w_p4a = 0, w_p4b = 0, w_p2c = 0;
  logic    r_rep = 0;
  sample_t g0 [MAXT], g1 [MAXT], g2 [MAXT];
  logic    gv [MAXT];

  task automatic iir_record();
    g0[t] = r_y0; g1[t] = r_y1;
    g2[t] = r_p2c + qmul(r_y1, C[10]) + qmul(r_y0, C[11]);
    gv[t] = !r_rep && !w_p2c;
  endtask

  task automatic iir_advance(sample_t a0, sample_t a1, sample_t a2, logic iv_n);
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

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0d %s", t, msg);
  endtask

  // One clock: check both filters, then present the next inputs.
  task automatic step(bit fir_bubble = 1'b0, bit iir_bubble = 1'b0);
    sample_t a0, a1, a2;
    @(negedge clk);
    iir_record();
    if (exact) begin
      checks += 2;
      if (t > 0 && (fir_out_valid_n != !fir_ref_valid(t-1) ||
                    (fir_ref_valid(t-1) && fir_out != fir_ref(t-1))))
        fail($sformatf("FIR exact: %0d expected %0d", fir_out, fir_ref(t-1)));
      if (iir_out_valid_n != !gv[t] ||
          (gv[t] && (iir_out0 != g0[t] || iir_out1 != g1[t] || iir_out2 != g2[t])))
        fail("IIR exact mismatch");
      fp = t; ip = t + 1;
    end else begin
      if (!fir_out_valid_n) begin
        int idx = -1;
        checks++;
        for (int k = fp; k < t && k < fp + 12; k++)
          if (fir_ref_valid(k) && fir_ref(k) == fir_out) begin idx = k; break; end
        if (idx < 0) fail("FIR valid output matches no pending reference");
        else begin
          for (int k = fp; k < idx; k++) if (fir_ref_valid(k)) fail("FIR reference output skipped");
          fp = idx + 1;
        end
      end
      if (!iir_out_valid_n) begin
        int idx = -1;
        checks++;
        for (int k = ip; k <= t && k < ip + 12; k++)
          if (gv[k] && g0[k] == iir_out0 && g1[k] == iir_out1 && g2[k] == iir_out2) begin
            idx = k; break;
          end
        if (idx < 0) fail("IIR valid output matches no pending reference");
        else begin
          for (int k = ip; k < idx; k++) if (gv[k]) fail("IIR reference output skipped");
          ip = idx + 1;
        end
      end
    end
    xs[t] = sample_t'($urandom); xv_n[t] = fir_bubble;
    fir_in = xs[t]; fir_in_valid_n = fir_bubble;
    a0 = sample_t'($urandom); a1 = sample_t'($urandom); a2 = sample_t'($urandom);
    iir_in0 = a0; iir_in1 = a1; iir_in2 = a2; iir_in_valid_n = iir_bubble;
    iir_advance(a0, a1, a2, iir_bubble);
    t++;
  endtask

  `define ER_FLIP(path) begin logic v; v = path; force path = ~v; release path; end
  task automatic inject(int which);
    @(posedge clk); #1;
    case (which)
      0:  `ER_FLIP(dut.u_fir.u_p1.g_cell[3].u_cell.main_q)
      1:  `ER_FLIP(dut.u_fir.g_tap[0].u_m.g_cell[3].u_cell.main_q)
      2:  `ER_FLIP(dut.u_fir.g_tap[1].u_m.g_cell[3].u_cell.main_q)
      3:  `ER_FLIP(dut.u_fir.g_tap[2].u_m.g_cell[3].u_cell.main_q)
      4:  `ER_FLIP(dut.u_fir.g_tap[3].u_m.g_cell[3].u_cell.main_q)
      5:  `ER_FLIP(dut.u_fir.g_tap[4].u_m.g_cell[3].u_cell.main_q)
      6:  `ER_FLIP(dut.u_fir.g_tap[5].u_m.g_cell[3].u_cell.main_q)
      7:  `ER_FLIP(dut.u_fir.g_tap[0].u_b.g_cell[3].u_cell.main_q)
      8:  `ER_FLIP(dut.u_fir.g_tap[1].u_b.g_cell[3].u_cell.main_q)
      9:  `ER_FLIP(dut.u_fir.g_tap[2].u_b.g_cell[3].u_cell.main_q)
      10: `ER_FLIP(dut.u_fir.g_tap[3].u_b.g_cell[3].u_cell.main_q)
      11: `ER_FLIP(dut.u_fir.g_tap[4].u_b.g_cell[3].u_cell.main_q)
      12: `ER_FLIP(dut.u_fir.g_tap[5].u_b.g_cell[3].u_cell.main_q)
      default: ;
    endcase
    case (which)
      0: `ER_FLIP(dut.u_iir.u_p6a.g_cell[5].u_cell.main_q)
      1: `ER_FLIP(dut.u_iir.u_p6b.g_cell[5].u_cell.main_q)
      2: `ER_FLIP(dut.u_iir.u_p4a.g_cell[5].u_cell.main_q)
      3: `ER_FLIP(dut.u_iir.u_p4b.g_cell[5].u_cell.main_q)
      4: `ER_FLIP(dut.u_iir.u_p2c.g_cell[5].u_cell.main_q)
      5: `ER_FLIP(dut.u_iir.u_y0.g_cell[5].u_cell.main_q)
      6: `ER_FLIP(dut.u_iir.u_y1.g_cell[5].u_cell.main_q)
      7: `ER_FLIP(dut.u_iir.u_p3b.g_cell[5].u_cell.main_q)
      default: ;
    endcase
  endtask

  // Mechanism counters.
  int n_fir_corr = 0, n_fwd_stall = 0, n_lag = 0, n_fir_skip = 0;
  int n_iir_corr = 0, n_loop_hold = 0, n_join_rep = 0, n_loop_fwd = 0, n_iir_skip = 0;
  logic [5:0] lag_prev = '0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_fir.p1_err && !dut.u_fir.p1_mode) n_fir_corr++;
    if (dut.u_fir.p1_mode && dut.u_fir.u_p1_ctrl.tag_main_n) n_fir_skip++;
    for (int i = 0; i < 6; i++) begin
      if (dut.u_fir.m_err[i] && !dut.u_fir.m_ctl[i].sel2) n_fir_corr++;
      if (dut.u_fir.b_err[i] && !dut.u_fir.b_ctl[i].sel2) n_fir_corr++;
      if (dut.u_fir.m_stall[i] || dut.u_fir.b_stall[i]) n_fwd_stall++;
      if (dut.u_fir.b_lag[i] && !lag_prev[i]) n_lag++;
      lag_prev[i] = dut.u_fir.b_lag[i];
    end
    n_iir_corr += int'(dut.u_iir.e_p6a && !dut.u_iir.k_p6a.sel2)
                + int'(dut.u_iir.e_p6b && !dut.u_iir.k_p6b.sel2)
                + int'(dut.u_iir.e_p4a && !dut.u_iir.k_p4a.sel2)
                + int'(dut.u_iir.e_p4b && !dut.u_iir.k_p4b.sel2)
                + int'(dut.u_iir.e_p2c && !dut.u_iir.k_p2c.sel2)
                + int'(dut.u_iir.e_y0 && !dut.u_iir.k_y0.sel2)
                + int'(dut.u_iir.e_y1 && !dut.u_iir.k_y1.sel2)
                + int'(dut.u_iir.e_p3b && !dut.u_iir.k_p3b.sel2);
    if (dut.u_iir.k_y0.en) n_loop_hold++;
    if (dut.u_iir.loop_stall && !dut.u_iir.k_p4a.sel2) n_join_rep++;
    if (dut.u_iir.s_y0 || dut.u_iir.s_y1 || dut.u_iir.s_p2c) n_loop_fwd++;
    if (dut.u_iir.k_p4a.sel2 && dut.u_iir.u_p4a_ctrl.tag_main_n) n_iir_skip++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    exact = 1'b1;
    repeat (30) step();
    step(1'b1, 1'b1);        // invalid inputs in error-free operation
    repeat (12) step();
    exact = 1'b0;
    for (int s = 0; s <= 12; s++) begin
      fork inject(s); join_none
      repeat (6) step();
      step(1'b1, 1'b1);
      repeat (14) step();
    end
    exact = 1'b1;
    repeat (20) step();
    checks++;
    if (n_fir_corr < 13 || n_fwd_stall < 12 || n_lag < 1 || n_fir_skip < 1 ||
        n_iir_corr < 8 || n_loop_hold < 3 || n_join_rep < 1 || n_loop_fwd < 1 || n_iir_skip < 1)
      fail("a mechanism never occurred");
    $display("FIR: corrections=%0d stalls=%0d lag_inherits=%0d skips=%0d",
             n_fir_corr, n_fwd_stall, n_lag, n_fir_skip);
    $display("IIR: corrections=%0d loop_holds=%0d join_repeats=%0d loop_fwd_stalls=%0d skips=%0d",
             n_iir_corr, n_loop_hold, n_join_rep, n_loop_fwd, n_iir_skip);
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
