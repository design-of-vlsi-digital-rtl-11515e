// tb_er_feedback_ctrl: directed self-checking test of the feedback (loop)
// controller with two joining streams.  Checks the three kinds of hold: an
// own late value (current state invalid, corrected copy valid, stall_out to
// the joining stages), an invalid joining value or a stall from a joining
// stage (current state valid, repeated copy invalid), and a forward partner's
// stall (both copies valid).  It also checks that a hold lasts while joining
// values stay invalid and that the buffer is loaded only once per hold.
module tb_er_feedback_ctrl;
  import er_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, error = 1'b0, fwd = 1'b0;
  logic [1:0] vin = '0, stl = '0;
  er_ctl_t ctl;
  logic valid_out_n, stall_out, mode;

  er_feedback_ctrl #(.N_IN(2)) dut (.clk, .rst_n, .error, .valid_in_n(vin), .stall_in(stl),
                                    .fwd_stall_in(fwd), .ctl, .valid_out_n, .stall_out, .mode);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, step_no = 0;

  task automatic step(logic err, logic [1:0] v, logic [1:0] s, logic f,
                      logic s1, logic s2, logic en, logic vo, logic so);
    @(negedge clk);
    error = err; vin = v; stl = s; fwd = f;
    #1;
    checks++;
    if ({ctl.sel1, ctl.sel2, ctl.en, valid_out_n, stall_out} !== {s1, s2, en, vo, so}) begin
      failures++;
      $display("FAIL step %0d: sel1/sel2/en/vo/so = %b%b%b%b%b expected %b%b%b%b%b", step_no,
               ctl.sel1, ctl.sel2, ctl.en, valid_out_n, stall_out, s1, s2, en, vo, so);
    end
    step_no++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    //    err vin    stl    f   s1 s2 en vo so
    step(0, 2'b00, 2'b00, 0,  0, 0, 0, 0, 0);
    step(1, 2'b00, 2'b00, 0,  1, 0, 1, 1, 1);  // own late value
    step(0, 2'b00, 2'b00, 0,  0, 1, 0, 0, 0);  // corrected state, valid; resume
    step(0, 2'b00, 2'b00, 0,  0, 0, 0, 0, 0);
    step(0, 2'b10, 2'b00, 0,  0, 0, 1, 0, 0);  // invalid joining value: hold
    step(0, 2'b01, 2'b00, 0,  0, 1, 0, 1, 0);  // repeat (invalid), still invalid input
    step(0, 2'b00, 2'b00, 0,  0, 1, 0, 1, 0);  // repeat again, now resume
    step(0, 2'b00, 2'b01, 0,  0, 0, 1, 0, 0);  // joining stage late: hold
    step(0, 2'b00, 2'b00, 0,  0, 1, 0, 1, 0);
    step(0, 2'b00, 2'b00, 1,  0, 0, 1, 0, 0);  // forward partner late: hold
    step(0, 2'b00, 2'b00, 0,  0, 1, 0, 0, 0);  // repeated copy stays valid
    step(0, 2'b00, 2'b00, 0,  0, 0, 0, 0, 0);
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
