// tb_t_ff: self-checking test of the toggle flip-flop.
//
// Checks the four rows of the toggle truth table (T=0 holds, T=1 inverts),
// the asynchronous clear, and 500 random cycles of T against a reference
// state kept in the testbench. Q' is checked to be the complement of Q.
module tb_t_ff;

  logic clk = 1'b0, reset_n = 1'b1, t = 1'b0;
  logic q, q_n;
  logic model;
  int   checks = 0, failures = 0;
  int   toggles = 0;

  t_ff dut (.clk(clk), .reset_n(reset_n), .t(t), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  task automatic check_state(input string what);
    checks++;
    if (q !== model || q_n !== ~model) begin
      failures++;
      $display("FAIL %s at %0t: q=%0b q_n=%0b model=%0b", what, $time, q, q_n, model);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 1'b0;
    #1 reset_n = 1'b0;
    #1 check_state("in reset");
    @(negedge clk) reset_n = 1'b1;
    // truth table: (T, Qn) -> Qn+1
    t = 1'b0; @(negedge clk); check_state("T=0 Q=0");         // 0 0 -> 0
    t = 1'b1; @(negedge clk); model = 1'b1; check_state("T=1 Q=0"); // 1 0 -> 1
    t = 1'b0; @(negedge clk); check_state("T=0 Q=1");         // 0 1 -> 1
    t = 1'b1; @(negedge clk); model = 1'b0; check_state("T=1 Q=1"); // 1 1 -> 0
    repeat (500) begin
      t = 1'($urandom);
      @(negedge clk);
      if (t) begin model = ~model; toggles++; end
      check_state("random");
    end
    // asynchronous clear between edges
    t = 1'b1; @(negedge clk); model = ~model;
    if (!model) begin @(negedge clk); model = ~model; end
    #1 reset_n = 1'b0; #1 model = 1'b0; check_state("async clear");
    #1 reset_n = 1'b1;
    checks++;
    if (toggles < 100) begin failures++; $display("FAIL too few toggles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_t_ff
