// tb_dsrc_encoder_top: end-to-end test of the DSRC line-coding stage.
//
// Sends a random bit stream through all three encoders at once and samples
// every output in the middle of each half-bit. The testbench decodes the line
// codes itself (FM0: a bit is 1 when its halves are equal; Manchester: a bit
// is its second half) and compares the decoded bits with what was sent. It
// also checks the FM0 boundary transition, that the combined encoder matches
// the stand-alone FM0 encoder until it first enters Manchester mode and the
// stand-alone Manchester encoder while in Manchester mode, and that one bit
// is taken per clock period.
//
// Each mechanism of the design is counted and must happen at least once:
// FM0 zeros and ones, Manchester zeros and ones, switches FM0->Manchester and
// Manchester->FM0, FM0 resuming from held state, and a reset mid-stream.
module tb_dsrc_encoder_top;

  logic clk = 1'b0, reset_n = 1'b1, x = 1'b0, mode = 1'b0;
  logic y_sols, y_fm0, y_manchester;
  logic s1, s2, f1, f2, m1, m2;
  logic prev_s2, prev_f2, prev_mode;
  logic sols_in_sync;   // combined encoder's FM0 state equals the stand-alone one
  logic after_reset;
  int checks = 0, failures = 0;
  int cycles = 0, bits_sent = 0;
  int n_fm0_0 = 0, n_fm0_1 = 0, n_man_0 = 0, n_man_1 = 0;
  int n_to_man = 0, n_to_fm0 = 0, n_resume = 0, n_reset = 0;

  dsrc_encoder_top dut (
    .clk(clk), .reset_n(reset_n), .x(x), .mode(mode),
    .y_sols(y_sols), .y_fm0(y_fm0), .y_manchester(y_manchester)
  );

  always @(posedge clk) cycles++;

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t (x=%0b mode=%0b)", what, $time, x, mode);
  endtask

  task automatic send_bit(input logic b, input logic m);
    clk = 1'b1; #1 x = b; mode = m; #1;
    s1 = y_sols; f1 = y_fm0; m1 = y_manchester;
    #3 clk = 1'b0; #2;
    s2 = y_sols; f2 = y_fm0; m2 = y_manchester;
    #3;
    bits_sent++;
    // stand-alone FM0 encoder: decode and boundary rule
    checks++;
    if ((f1 == f2) !== b) fail("stand-alone FM0 decodes wrong");
    checks++;
    if (!after_reset && f1 == prev_f2) fail("stand-alone FM0 boundary rule");
    if (after_reset && f1 !== 1'b1) fail("stand-alone FM0 first half after reset");
    // stand-alone Manchester encoder: decode and mid-bit transition
    checks++;
    if (m2 !== b || m1 === m2) fail("stand-alone Manchester wrong");
    // combined encoder
    if (m == 1'b0) begin
      checks++;
      if ((s1 == s2) !== b) fail("SOLS FM0 decodes wrong");
      if (!after_reset && prev_mode == 1'b0) begin
        checks++;
        if (s1 == prev_s2) fail("SOLS FM0 boundary rule");
      end
      if (sols_in_sync) begin
        checks++;
        if (s1 !== f1 || s2 !== f2) fail("SOLS FM0 differs from stand-alone FM0");
      end
      if (prev_mode == 1'b1) n_resume++;
      if (b) n_fm0_1++; else n_fm0_0++;
    end else begin
      checks++;
      if (s1 !== m1 || s2 !== m2) fail("SOLS Manchester differs from stand-alone");
      if (b) n_man_1++; else n_man_0++;
      if (b) sols_in_sync = 1'b0;   // stand-alone FM0 toggled, combined one held
    end
    if (m != prev_mode) begin
      if (m) n_to_man++; else n_to_fm0++;
    end
    prev_mode = m; prev_s2 = s2; prev_f2 = f2;
    after_reset = 1'b0;
  endtask

  task automatic do_reset();
    reset_n = 1'b0; x = 1'b0; #1 reset_n = 1'b1;
    after_reset = 1'b1; sols_in_sync = 1'b1; prev_mode = 1'b0;
    n_reset++;
  endtask

  initial begin : watchdog
    #500000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m;
    #3 do_reset();
    m = 1'b0;
    repeat (300) send_bit(1'($urandom), 1'b0);
    repeat (1500) begin
      if ($urandom % 20 == 0) m = ~m;
      send_bit(1'($urandom), m);
    end
    #1 do_reset();
    repeat (200) send_bit(1'($urandom), 1'b0);

    checks++;
    if (cycles != bits_sent) fail($sformatf("%0d clock cycles for %0d bits", cycles, bits_sent));
    $display("count: FM0 0/1 %0d/%0d, Manchester 0/1 %0d/%0d, to Manchester %0d, to FM0 %0d, resumes %0d, resets %0d",
             n_fm0_0, n_fm0_1, n_man_0, n_man_1, n_to_man, n_to_fm0, n_resume, n_reset);
    checks++;
    if (n_fm0_0 == 0 || n_fm0_1 == 0 || n_man_0 == 0 || n_man_1 == 0 ||
        n_to_man == 0 || n_to_fm0 == 0 || n_resume == 0 || n_reset < 2)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_dsrc_encoder_top
