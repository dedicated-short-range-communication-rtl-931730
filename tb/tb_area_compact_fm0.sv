// tb_area_compact_fm0: self-checking test of the FM0 encoder.
//
// Drives random bits, one per clock period, and samples the output in the
// middle of each half-bit. Each bit is checked against the three FM0 rules
// directly, without a model of the encoder's state:
//   - a 0 has a transition between its two halves,
//   - a 1 has none,
//   - there is a transition at every bit boundary.
// After reset the first half-bit must be high (state cleared to 0). The
// running disparity of FM0 stays within +-2 half-bits; that is checked too.
// A reset in the middle of the stream is applied once.
module tb_area_compact_fm0;

  logic clk = 1'b0, reset_n = 1'b1, x = 1'b0;
  logic y;
  logic h1, h2, prev_h2;
  logic first_bit;
  int   checks = 0, failures = 0;
  int   disparity = 0;
  int   zeros = 0, ones = 0;
  localparam logic [7:0] pattern = 8'b1100_0101;

  area_compact_fm0 dut (.clk(clk), .reset_n(reset_n), .x(x), .y(y));

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  task automatic send_bit(input logic b);
    clk = 1'b1; #1 x = b; #1 h1 = y; #3;
    clk = 1'b0; #2 h2 = y; #3;
    checks++;
    if (b == 1'b0 && h1 == h2) fail("no mid-bit transition for 0");
    if (b == 1'b1 && h1 != h2) fail("mid-bit transition for 1");
    checks++;
    if (first_bit) begin
      if (h1 !== 1'b1) fail("first half-bit after reset is not high");
    end else if (h1 == prev_h2) fail("no transition at bit boundary");
    first_bit = 1'b0;
    prev_h2   = h2;
    disparity += (h1 ? 1 : -1) + (h2 ? 1 : -1);
    checks++;
    if (disparity > 2 || disparity < -2) fail("running disparity out of +-2");
    if (b) ones++; else zeros++;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 reset_n = 1'b0;
    #2 reset_n = 1'b1;
    first_bit = 1'b1;
    // fixed pattern: runs of ones and zeros
    for (int i = 7; i >= 0; i--) send_bit(pattern[i]);
    repeat (200) send_bit(1'($urandom));
    // reset mid-stream: the next bit must again start high
    #1 reset_n = 1'b0; x = 1'b0; #1 reset_n = 1'b1;
    first_bit = 1'b1; disparity = 0;
    repeat (200) send_bit(1'($urandom));
    checks++;
    if (zeros < 50 || ones < 50) fail("stimulus did not cover both bit values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_area_compact_fm0
