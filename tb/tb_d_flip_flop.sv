// tb_d_flip_flop: self-checking test of the preset/clear D flip-flop.
//
// Walks the rows of the flip-flop's truth table (preset, clear, both, rising
// edge with D=0/1, no edge) and then applies 400 random cycles of D, pr_n and
// clr_n, comparing Q and Q' after every step with a reference model kept in
// the testbench. The model lets preset and clear act when they are asserted
// and at clock edges, as an edge-sensitive flip-flop does.
module tb_d_flip_flop;

  logic clk = 1'b0, pr_n = 1'b1, clr_n = 1'b1, d = 1'b0;
  logic q, q_n;
  int   checks = 0, failures = 0;
  logic model;

  d_flip_flop dut (.clk(clk), .pr_n(pr_n), .clr_n(clr_n), .d(d), .q(q), .q_n(q_n));

  task automatic expect_out(input logic eq, input logic eqn, input string what);
    checks++;
    if (q !== eq || q_n !== eqn) begin
      failures++;
      $display("FAIL %s: q=%0b q_n=%0b expected %0b %0b", what, q, q_n, eq, eqn);
    end
  endtask

  task automatic edge_clk();
    #2 clk = 1'b1;
    #2 clk = 1'b0;
    #1;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // PR'=0, CLR'=1: Q=1 at once, no clock
    pr_n = 1'b0; clr_n = 1'b1; #1; expect_out(1'b1, 1'b0, "preset");
    // PR'=1, CLR'=0: Q=0 at once
    pr_n = 1'b1; clr_n = 1'b0; #1; expect_out(1'b0, 1'b1, "clear");
    // both low: both outputs high (this design's choice for the undefined row)
    pr_n = 1'b0; clr_n = 1'b0; #1; expect_out(1'b1, 1'b1, "both forced");
    pr_n = 1'b1; clr_n = 1'b1; #1; expect_out(1'b0, 1'b1, "after both released");
    // rising edge with D=1, then D=0
    d = 1'b1; #1; expect_out(1'b0, 1'b1, "D change without edge");
    edge_clk(); expect_out(1'b1, 1'b0, "edge D=1");
    d = 1'b0; #1; expect_out(1'b1, 1'b0, "hold before edge");
    edge_clk(); expect_out(1'b0, 1'b1, "edge D=0");
    // falling edge alone must not capture
    d = 1'b1; clk = 1'b1; #1; expect_out(1'b1, 1'b0, "rising edge D=1 (2)");
    d = 1'b0; #1; clk = 1'b0; #1; expect_out(1'b1, 1'b0, "falling edge ignored");

    model = 1'b1;
    repeat (400) begin
      logic prev_pr_n, prev_clr_n;
      prev_pr_n  = pr_n;
      prev_clr_n = clr_n;
      d     = 1'($urandom);
      pr_n  = ($urandom % 8) != 0;
      clr_n = ($urandom % 8) != 0;
      #1;
      // the asynchronous inputs act when they are asserted (falling edge)
      if ((prev_pr_n && !pr_n) || (prev_clr_n && !clr_n)) begin
        if (!clr_n) model = 1'b0;
        else model = 1'b1;
      end
      if (!pr_n && !clr_n) expect_out(1'b1, 1'b1, "random both");
      else expect_out(model, ~model, "random async");
      #1 clk = 1'b1;
      if (!clr_n) model = 1'b0;
      else if (!pr_n) model = 1'b1;
      else model = d;
      #1;
      if (!pr_n && !clr_n) expect_out(1'b1, 1'b1, "random both edge");
      else expect_out(model, ~model, "random edge");
      #1 clk = 1'b0;
      #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_d_flip_flop
