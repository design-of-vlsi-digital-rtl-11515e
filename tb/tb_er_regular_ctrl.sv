// tb_er_regular_ctrl: directed self-checking test of the regular controller.
//
// Each step sets the inputs after a falling edge, checks the combinational
// outputs (sel1, sel2, en, valid_out_n), then lets a rising edge pass.  The
// expected values follow the two-mode protocol: an error marks the current
// value invalid and loads the buffer, delay mode shows the buffer, an
// invalid value arriving in delay mode is skipped and normal mode returns.
module tb_er_regular_ctrl;
  import er_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, error = 1'b0, valid_in_n = 1'b0;
  er_ctl_t ctl;
  logic valid_out_n, mode;

  er_regular_ctrl dut (.clk, .rst_n, .error, .valid_in_n, .ctl, .valid_out_n, .mode);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, step_no = 0;

  // err, vin: inputs; s1, s2, en, vo: expected outputs.
  task automatic step(logic err, logic vin, logic s1, logic s2, logic en, logic vo);
    @(negedge clk);
    error = err; valid_in_n = vin;
    #1;
    checks++;
    if ({ctl.sel1, ctl.sel2, ctl.en, valid_out_n} !== {s1, s2, en, vo}) begin
      failures++;
      $display("FAIL step %0d: sel1/sel2/en/vo = %b%b%b%b expected %b%b%b%b", step_no,
               ctl.sel1, ctl.sel2, ctl.en, valid_out_n, s1, s2, en, vo);
    end
    step_no++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    //    err vin  s1 s2 en vo
    step(0, 0,   0, 0, 0, 0);  // normal, valid
    step(0, 1,   0, 0, 0, 0);  // invalid value enters
    step(0, 0,   0, 0, 0, 1);  // ... and leaves, flagged
    step(1, 0,   1, 0, 1, 1);  // late value: invalid now, buffer from delay FF
    step(0, 0,   0, 1, 1, 0);  // delay mode: corrected copy, valid
    step(1, 0,   1, 1, 1, 0);  // late value in delay mode: masked
    step(0, 1,   0, 1, 1, 0);  // invalid value about to enter main FF
    step(0, 0,   0, 1, 0, 0);  // it is in the main FF: skipped, leave delay mode
    step(0, 0,   0, 0, 0, 0);  // normal again
    step(0, 0,   0, 0, 0, 0);
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
