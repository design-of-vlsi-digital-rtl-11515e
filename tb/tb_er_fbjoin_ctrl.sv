// tb_er_fbjoin_ctrl: directed self-checking test of the feedback joining
// controller.  Checks that a stall request from the loop stage marks the
// current value invalid and repeats it from the buffer flip-flop, that an own
// late value raises stall_out and is corrected, and that an invalid value
// arriving in delay mode returns the stage to normal mode.  A repeat asked
// while already in delay mode keeps the buffer flip-flop loaded.
module tb_er_fbjoin_ctrl;
  import er_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, error = 1'b0, valid_in_n = 1'b0, stall_in = 1'b0;
  er_ctl_t ctl;
  logic valid_out_n, stall_out, mode;

  er_fbjoin_ctrl dut (.clk, .rst_n, .error, .valid_in_n, .stall_in, .ctl, .valid_out_n,
                      .stall_out, .mode);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, step_no = 0;

  task automatic step(logic err, logic vin, logic st,
                      logic s1, logic s2, logic en, logic vo, logic so);
    @(negedge clk);
    error = err; valid_in_n = vin; stall_in = st;
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
    //    err vin st   s1 s2 en vo so
    step(0, 0, 0,   0, 0, 0, 0, 0);
    step(0, 0, 1,   0, 0, 1, 1, 0);  // loop asks for a repeat
    step(0, 0, 0,   0, 1, 1, 0, 0);  // repeated value, valid
    step(0, 1, 0,   0, 1, 1, 0, 0);  // invalid value on its way
    step(0, 0, 0,   0, 1, 0, 0, 0);  // skipped: back to normal
    step(1, 0, 0,   1, 0, 1, 1, 1);  // own late value: stall_out, invalid
    step(0, 0, 0,   0, 1, 1, 0, 0);  // corrected copy
    step(0, 0, 1,   0, 1, 0, 0, 0);  // repeat asked in delay mode: buffer holds
    step(0, 1, 0,   0, 1, 1, 0, 0);
    step(0, 0, 0,   0, 1, 0, 0, 0);
    step(0, 0, 0,   0, 0, 0, 0, 0);
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
