// tb_er_buffer_cell: self-checking test of the one-bit error-tolerant buffer.
//
// clk_d is tied to clk (zero-delay simulation), so the delay flip-flop always
// holds the value d had at the last edge.  A late arrival is emulated by
// inverting the main flip-flop right after an edge.  The test checks the
// normal path (q = d one cycle later, no error), the error flag, loading the
// buffer flip-flop from the delay flip-flop (sel1 = 1) and from the main one
// (sel1 = 0), holding it while en = 0, and the output multiplexer.
module tb_er_buffer_cell;
  import er_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q, err;
  wire  clk_d = clk;
  er_ctl_t ctl = '0;

  er_buffer_cell dut (.clk, .clk_d, .rst_n, .d, .ctl, .q, .err);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic last_d;

  task automatic expect_eq(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // Present d for the next edge, then wait for that edge to settle.
  task automatic edge_with(logic dv);
    @(negedge clk); d = dv;
    @(posedge clk); #1;
    last_d = dv;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Normal path.
    for (int i = 0; i < 20; i++) begin
      edge_with(1'($urandom));
      expect_eq("normal q", q, last_d);
      expect_eq("normal err", err, 1'b0);
    end
    // Late arrival: main flip-flop holds the wrong value.
    edge_with(1'b1);
    force dut.main_q = 1'b0; release dut.main_q; #1;
    expect_eq("late q shows main", q, 1'b0);
    expect_eq("late err", err, 1'b1);
    // Correct: buffer takes the delay flip-flop, output switches to it.
    @(negedge clk); ctl = '{sel1: 1'b1, sel2: 1'b0, en: 1'b1}; d = 1'b0;
    @(posedge clk); #1;
    ctl = '{sel1: 1'b0, sel2: 1'b1, en: 1'b0};
    #1;
    expect_eq("corrected q from buffer", q, 1'b1);
    expect_eq("err cleared", err, 1'b0);
    // Buffer holds while en = 0.
    edge_with(1'b1);
    expect_eq("buffer held", q, 1'b1);
    edge_with(1'b0);
    expect_eq("buffer still held", q, 1'b1);
    // Delay mode pipeline: buffer loads from main (sel1 = 0).
    @(negedge clk); ctl = '{sel1: 1'b0, sel2: 1'b1, en: 1'b1};
    for (int i = 0; i < 10; i++) begin
      logic prev;
      prev = last_d;
      edge_with(1'($urandom));
      expect_eq("delay-mode q = value one edge older", q, prev);
    end
    // Back to the main path.
    @(negedge clk); ctl = '0;
    #1 expect_eq("main path again", q, last_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
