// tb_manchester_encoder: self-checking test of the Manchester encoder.
//
// Drives 300 random bits, one per clock period, and samples the output in
// the middle of each half-bit. A 1 must be sent low-then-high and a 0
// high-then-low, so every bit has exactly one transition in its middle and
// its two halves balance. The number of high and low half-bits over the run
// must be equal (no DC component).
module tb_manchester_encoder;

  logic clk = 1'b0, x = 1'b0;
  logic y;
  logic h1, h2;
  int   checks = 0, failures = 0;
  int   disparity = 0;

  manchester_encoder dut (.clk(clk), .x(x), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) begin
      clk = 1'b1; #1 x = 1'($urandom); #1 h1 = y; #3;
      clk = 1'b0; #2 h2 = y; #3;
      checks++;
      if (h1 !== ~x || h2 !== x) begin
        failures++;
        $display("FAIL bit %0b sent as %0b%0b", x, h1, h2);
      end
      disparity += (h1 ? 1 : -1) + (h2 ? 1 : -1);
    end
    checks++;
    if (disparity != 0) begin failures++; $display("FAIL disparity %0d", disparity); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_manchester_encoder
