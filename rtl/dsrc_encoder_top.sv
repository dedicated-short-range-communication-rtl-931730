// dsrc_encoder_top: line-coding stage of a DSRC transmitter.
//
// DSRC links use FM0 or Manchester code for DC balance and clock recovery.
// This top feeds one bit stream and one bit clock to three encoders that sit
// side by side:
//   u_sols        balance_logic, the combined FM0/Manchester encoder, whose
//                 code is chosen by mode (0 FM0, 1 Manchester);
//   u_fm0         area_compact_fm0, a stand-alone FM0 encoder;
//   u_manchester  manchester_encoder, a stand-alone Manchester encoder.
// With mode = 0, y_sols equals y_fm0 as long as the SOLS encoder has not been
// in Manchester mode since reset; with mode = 1, y_sols equals y_manchester.
//
// Interface: clk is the bit clock, high for the first half of each bit, so
// one data bit is encoded per clock period and each output holds two
// half-bit symbols per period. x and mode must be stable from one rising edge
// of clk to the next. reset_n (active low, asynchronous) clears both FM0
// state flip-flops. Outputs follow clk combinationally: no latency.
// After reset, the rising edge that starts the first bit also loads the state
// with the x of the period before it, so hold x at 0 while idle.
module dsrc_encoder_top
  import sols_pkg::*;
(
  input  logic clk,
  input  logic reset_n,
  input  logic x,
  input  logic mode,
  output logic y_sols,
  output logic y_fm0,
  output logic y_manchester
);

  balance_logic u_sols (
    .clk    (clk),
    .reset_n(reset_n),
    .x      (x),
    .mode   (code_mode_e'(mode)),
    .y      (y_sols)
  );

  area_compact_fm0 u_fm0 (
    .clk    (clk),
    .reset_n(reset_n),
    .x      (x),
    .y      (y_fm0)
  );

  manchester_encoder u_manchester (
    .clk(clk),
    .x  (x),
    .y  (y_manchester)
  );

endmodule : dsrc_encoder_top
