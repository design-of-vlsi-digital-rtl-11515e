// tb_er_forward_ctrl: self-checking test of the forward controller, run as
// the pair it is used in.  Two controllers are cross-connected (stall_out to
// the partner's stall_in, each one's valid_in1_n to the other's valid_in2_n).
// Directed steps check that an error in either stage moves both into delay
// mode in the same cycle, that an invalid value entering only one of them
// returns both to normal mode together, and that lag_in makes a stage follow
// one cycle later and leave again when lag_in falls.
module tb_er_forward_ctrl;
  import er_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic err_a = 1'b0, err_b = 1'b0, vin_a = 1'b0, vin_b = 1'b0, lag_b = 1'b0;
  er_ctl_t ctl_a, ctl_b;
  logic vo_a, vo_b, so_a, so_b, mode_a, mode_b;

  er_forward_ctrl u_a (.clk, .rst_n, .error(err_a), .valid_in1_n(vin_a), .valid_in2_n(vin_b),
                       .stall_in(so_b), .lag_in(1'b0), .ctl(ctl_a), .valid_out_n(vo_a),
                       .stall_out(so_a), .mode(mode_a));
  er_forward_ctrl u_b (.clk, .rst_n, .error(err_b), .valid_in1_n(vin_b), .valid_in2_n(vin_a),
                       .stall_in(so_a), .lag_in(lag_b), .ctl(ctl_b), .valid_out_n(vo_b),
                       .stall_out(so_b), .mode(mode_b));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, step_no = 0;

  // Inputs, then expected {sel2, en, valid_out_n, stall_out} of A and of B.
  task automatic step(logic ea, logic eb, logic va, logic vb, logic lg,
                      logic [3:0] exp_a, logic [3:0] exp_b);
    @(negedge clk);
    err_a = ea; err_b = eb; vin_a = va; vin_b = vb; lag_b = lg;
    #1;
    checks++;
    if ({ctl_a.sel2, ctl_a.en, vo_a, so_a} !== exp_a ||
        {ctl_b.sel2, ctl_b.en, vo_b, so_b} !== exp_b) begin
      failures++;
      $display("FAIL step %0d: A=%b%b%b%b exp %b  B=%b%b%b%b exp %b", step_no,
               ctl_a.sel2, ctl_a.en, vo_a, so_a, exp_a, ctl_b.sel2, ctl_b.en, vo_b, so_b, exp_b);
    end
    checks++;
    if (ctl_a.sel1 !== ea || ctl_b.sel1 !== eb) begin
      failures++;
      $display("FAIL step %0d: sel1 does not follow the stage error", step_no);
    end
    step_no++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    //    ea eb va vb lg   A(s2 en vo so)  B(s2 en vo so)
    step(0, 0, 0, 0, 0,  4'b0000,        4'b0000);
    step(1, 0, 0, 0, 0,  4'b0111,        4'b0100);  // A late: both enter
    step(0, 0, 0, 0, 0,  4'b1100,        4'b1100);  // both in delay mode
    step(0, 0, 0, 1, 0,  4'b1100,        4'b1100);  // invalid value toward B only
    step(0, 0, 0, 0, 0,  4'b1000,        4'b1000);  // both leave together
    step(0, 0, 0, 0, 0,  4'b0000,        4'b0000);  // the invalid value was skipped
    step(0, 1, 0, 0, 0,  4'b0100,        4'b0111);  // B late: both enter
    step(0, 0, 1, 0, 0,  4'b1100,        4'b1100);
    step(0, 0, 0, 0, 0,  4'b1000,        4'b1000);  // A's invalid value ends it
    step(0, 0, 0, 0, 1,  4'b0000,        4'b0100);  // lag_in: B enters next edge
    step(0, 0, 0, 0, 1,  4'b0000,        4'b1100);  // B inherited delay mode
    step(0, 0, 0, 1, 1,  4'b0000,        4'b1100);  // own invalid value: no exit
    step(0, 0, 0, 0, 0,  4'b0000,        4'b1000);  // lag_in fell: B leaves
    step(0, 0, 0, 0, 0,  4'b0000,        4'b0000);  // B's invalid value was skipped
    step(0, 0, 1, 0, 0,  4'b0000,        4'b0000);
    step(0, 0, 0, 0, 0,  4'b0010,        4'b0000);  // normal mode passes it on, flagged
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
