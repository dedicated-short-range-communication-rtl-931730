// balance_logic: combined FM0 / Manchester encoder (SOLS architecture).
//
// One encoder serves both line codes. In both codes the output is taken from
// a multiplexer selected by the clock level: its "clk high" input is the
// first half-bit and its "clk low" input the second. The two codes differ
// only in what feeds those inputs:
//   FM0:        first half = not B(t-1),  second half = X xor B(t-1)
//   Manchester: first half = not X,       second half = X
// Writing the Manchester halves as not X and X xor 0 shows that both codes
// use the same inverter and the same XOR: a source multiplexer picks B(t-1)
// (FM0) or X (Manchester) for the inverter, and the XOR's second operand is
// B(t-1) gated by the mode. Both codes thus pass through the same logic depth
// to the output multiplexer (balanced logic), and FM0's state is one
// flip-flop updated as a toggle flip-flop with T = X (area-compact retiming).
//
// While Manchester code is selected the toggle input is held at 0, so B(t-1)
// keeps its value and the flip-flop does not switch; FM0 resumes from the
// stored state. Holding the state, the 0/1 mode encoding and the
// XOR-for-Manchester convention (a 1 is sent low-then-high) are this design's
// own choices.
//
// Interface: clk is the bit clock, high for the first half of each bit; x and
// mode must be stable from one rising edge of clk to the next; reset_n
// (active low, asynchronous) clears the FM0 state. Timing: y shows bit t
// during clock period t; the state updates at the rising edge ending it.
// After reset, the rising edge that starts the first bit also loads the state
// with the x of the period before it, so hold x at 0 while idle.
module balance_logic
  import sols_pkg::*;
(
  input  logic       clk,
  input  logic       reset_n,
  input  logic       x,
  input  code_mode_e mode,
  output logic       y
);

  logic is_fm0;
  logic dff_b;      // B(t-1), FM0 state
  logic t_in;       // toggle input of the state flip-flop
  logic inv_src;    // source of the first half-bit before inversion
  logic xor_gate;   // second operand of the shared XOR
  logic first_half;
  logic second_half;

  assign is_fm0 = (mode == CODE_FM0);

  assign t_in = x & is_fm0;

  t_ff u_dff_b (
    .clk    (clk),
    .reset_n(reset_n),
    .t      (t_in),
    .q      (dff_b),
    .q_n    ()
  );

  assign inv_src     = is_fm0 ? dff_b : x;
  assign first_half  = ~inv_src;
  assign xor_gate    = dff_b & is_fm0;
  assign second_half = x ^ xor_gate;

  assign y = clk ? first_half : second_half;

endmodule : balance_logic
