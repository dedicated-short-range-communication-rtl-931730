// tb_dsrc_bsm: encodes whole Basic Safety Messages through the line coder.
//
// A Basic Safety Message averages 320 bytes (2560 bits). The testbench makes
// three such messages from a 16-bit LFSR (x^16+x^14+x^13+x^11+1, seed 16'hACE1),
// and sends them MSB first through the top with its default configuration:
// the first in FM0, the second in Manchester, the third in FM0 again. It
// decodes y_sols and the matching stand-alone output back into bytes and
// compares every byte, checks that each message takes exactly 2560 clock
// periods (one bit per clock), and checks DC balance: Manchester's running
// disparity returns to 0 after every bit, FM0's stays within +-2 half-bits.
module tb_dsrc_bsm;

  localparam int MSG_BYTES = 320;

  logic clk = 1'b0, reset_n = 1'b1, x = 1'b0, mode = 1'b0;
  logic y_sols, y_fm0, y_manchester;
  logic [15:0] lfsr = 16'hACE1;
  int checks = 0, failures = 0;
  int cycles = 0;

  dsrc_encoder_top dut (
    .clk(clk), .reset_n(reset_n), .x(x), .mode(mode),
    .y_sols(y_sols), .y_fm0(y_fm0), .y_manchester(y_manchester)
  );

  always @(posedge clk) cycles++;

  function automatic logic [7:0] next_byte();
    logic [7:0] v;
    for (int i = 0; i < 8; i++) begin
      lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      v[i] = lfsr[0];
    end
    return v;
  endfunction

  task automatic send_message(input logic m, input int msg_no);
    logic [7:0] tx, rx_sols, rx_ref;
    logic s1, s2, r1, r2;
    int   disp_sols = 0, start_cycles, bad_bytes = 0;
    start_cycles = cycles;
    for (int n = 0; n < MSG_BYTES; n++) begin
      tx = next_byte();
      for (int i = 7; i >= 0; i--) begin
        clk = 1'b1; #1 x = tx[i]; mode = m; #1;
        s1 = y_sols; r1 = m ? y_manchester : y_fm0;
        #3 clk = 1'b0; #2;
        s2 = y_sols; r2 = m ? y_manchester : y_fm0;
        #3;
        rx_sols[i] = m ? s2 : (s1 == s2);
        rx_ref[i]  = m ? r2 : (r1 == r2);
        disp_sols += (s1 ? 1 : -1) + (s2 ? 1 : -1);
        checks++;
        if (m ? (disp_sols != 0) : (disp_sols > 2 || disp_sols < -2)) begin
          failures++;
          $display("FAIL message %0d byte %0d: running disparity %0d", msg_no, n, disp_sols);
        end
      end
      checks++;
      if (rx_sols !== tx || rx_ref !== tx) begin
        failures++; bad_bytes++;
        if (bad_bytes < 5)
          $display("FAIL message %0d byte %0d: sent %h, decoded %h / %h", msg_no, n, tx, rx_sols, rx_ref);
      end
    end
    checks++;
    if (cycles - start_cycles != MSG_BYTES * 8) begin
      failures++;
      $display("FAIL message %0d took %0d clock periods", msg_no, cycles - start_cycles);
    end
    $display("message %0d (%s): %0d bytes in %0d clock periods", msg_no, m ? "Manchester" : "FM0",
             MSG_BYTES, cycles - start_cycles);
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 reset_n = 1'b0;
    #2 reset_n = 1'b1;
    send_message(1'b0, 1);
    send_message(1'b1, 2);
    send_message(1'b0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_dsrc_bsm
