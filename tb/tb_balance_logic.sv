// tb_balance_logic: self-checking test of the combined FM0/Manchester encoder.
//
// Drives random bits with the code mode switched at random bit boundaries
// and samples the output in the middle of each half-bit. Each bit is checked
// two ways: against the line-code rules (FM0: boundary transition, mid-bit
// transition only for 0; Manchester: 1 low-then-high, 0 high-then-low) and
// against a reference FM0 state that holds its value in Manchester mode. It
// counts how many FM0 bits, Manchester bits and mode switches in each
// direction were exercised and fails if any of them never happened.
module tb_balance_logic;
  import sols_pkg::*;

  logic       clk = 1'b0, reset_n = 1'b1, x = 1'b0;
  code_mode_e mode = CODE_FM0, prev_mode = CODE_FM0;
  logic       y;
  logic       h1, h2, prev_h2;
  logic       b_model;
  logic       first_bit;
  int checks = 0, failures = 0;
  int n_fm0 = 0, n_man = 0, n_to_man = 0, n_to_fm0 = 0;

  balance_logic dut (.clk(clk), .reset_n(reset_n), .x(x), .mode(mode), .y(y));

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t (x=%0b mode=%s y=%0b%0b)", what, $time, x, mode.name(), h1, h2);
  endtask

  task automatic send_bit(input logic b, input code_mode_e m);
    clk = 1'b1; #1 x = b; mode = m; #1 h1 = y; #3;
    clk = 1'b0; #2 h2 = y; #3;
    if (m == CODE_FM0) begin
      n_fm0++;
      checks++;
      if ((b == 1'b0) == (h1 == h2)) fail("FM0 mid-bit rule");
      checks++;
      if (first_bit && h1 !== 1'b1) fail("FM0 first half-bit after reset");
      if (!first_bit && prev_mode == CODE_FM0 && h1 == prev_h2) fail("FM0 boundary rule");
      checks++;
      if (h1 !== ~b_model || h2 !== (b ^ b_model)) fail("FM0 against reference state");
      b_model = b ^ b_model;
      first_bit = 1'b0;
    end else begin
      n_man++;
      checks++;
      if (h1 !== ~b || h2 !== b) fail("Manchester code");
    end
    if (m != prev_mode) begin
      if (m == CODE_MANCHESTER) n_to_man++; else n_to_fm0++;
    end
    prev_mode = m;
    prev_h2   = h2;
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_mode_e m;
    b_model = 1'b0; first_bit = 1'b1;
    #1 reset_n = 1'b0;
    #2 reset_n = 1'b1;
    m = CODE_FM0;
    repeat (1000) begin
      if ($urandom % 16 == 0) m = (m == CODE_FM0) ? CODE_MANCHESTER : CODE_FM0;
      send_bit(1'($urandom), m);
    end
    checks++;
    if (n_fm0 == 0 || n_man == 0 || n_to_man == 0 || n_to_fm0 == 0) fail("a mode or mode switch never happened");
    $display("FM0 bits %0d, Manchester bits %0d, switches to Manchester %0d, to FM0 %0d",
             n_fm0, n_man, n_to_man, n_to_fm0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_balance_logic
