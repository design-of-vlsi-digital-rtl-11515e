// tb_er_pipe_stage: self-checking test of a 16-bit error-tolerant stage.
//
// Checks that q follows d by one edge with err low, that a late value in any
// single bit (emulated by inverting that bit's main flip-flop) raises the
// stage's OR'ed err, and that with sel1 = 1 and en = 1 the whole word is
// restored from the delay flip-flops and shown with sel2 = 1.
module tb_er_pipe_stage;
  import er_pkg::*;

  localparam int unsigned W = 16;
  logic clk = 1'b0, rst_n = 1'b0, err;
  wire  clk_d = clk;
  logic [W-1:0] d = '0, q;
  er_ctl_t ctl = '0;

  er_pipe_stage #(.W(W)) dut (.clk, .clk_d, .rst_n, .d, .ctl, .q, .err);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic expect_eq(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  `define ER_FLIP(path) begin logic v; v = path; force path = ~v; release path; end

  initial begin
    logic [W-1:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); v = W'($urandom); d = v;
      @(posedge clk); #1;
      expect_eq("q", q, v);
      expect_eq("err", W'(err), '0);
    end
    // A late value in bit 0, bit 9 and bit 15 in turn.
    for (int b = 0; b < 3; b++) begin
      @(negedge clk); v = W'($urandom); d = v; ctl = '0;
      @(posedge clk); #1;
      case (b)
        0: `ER_FLIP(dut.g_cell[0].u_cell.main_q)
        1: `ER_FLIP(dut.g_cell[9].u_cell.main_q)
        default: `ER_FLIP(dut.g_cell[15].u_cell.main_q)
      endcase
      #1;
      expect_eq("err raised", W'(err), W'(1));
      checks++;
      if (q == v) begin failures++; $display("FAIL corrupted word not visible"); end
      @(negedge clk); ctl = '{sel1: 1'b1, sel2: 1'b0, en: 1'b1}; d = ~v;
      @(posedge clk); #1;
      ctl = '{sel1: 1'b0, sel2: 1'b1, en: 1'b0}; #1;
      expect_eq("corrected word", q, v);
      expect_eq("err after", W'(err), '0);
      @(negedge clk); ctl = '0; #1;
      expect_eq("main path", q, ~v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
