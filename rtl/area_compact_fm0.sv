// area_compact_fm0: FM0 (bi-phase space) encoder with one state flip-flop.
//
// FM0 sends each bit as two half-bit levels A(t) then B(t) and obeys three
// rules: a 0 has a transition between its halves, a 1 has none, and there is
// always a transition at the boundary between bits. Hence
//   A(t) = not B(t-1)         (boundary transition)
//   B(t) = X(t) xor B(t-1)    (mid-bit transition exactly when X = 0)
// Both halves depend only on B(t-1), so a single flip-flop DFF_B holds the
// state. The next-state function B(t-1) -> X xor B(t-1) is a toggle flip-flop
// with T = X, built here from the t_ff block. A multiplexer selected by the
// clock level sends A(t) while clk is high and B(t) while clk is low.
//
// In the original retimed form the flip-flop samples the multiplexer output
// at the rising edge, when it still shows B(t). This design feeds the
// flip-flop from the XOR instead: the same value, without sampling a signal
// that the clock edge itself changes.
//
// Interface: clk is the bit clock, high for the first half of each bit; x
// must be stable from one rising edge of clk to the next; reset_n (active
// low, asynchronous) clears DFF_B, so the first bit after reset starts high.
// Timing: y shows bit t during clock period t, with no latency; DFF_B updates
// at the rising edge that ends the period.
// After reset, the rising edge that starts the first bit also loads the state
// with the x of the period before it, so hold x at 0 while idle.
module area_compact_fm0 (
  input  logic clk,
  input  logic reset_n,
  input  logic x,
  output logic y
);

  logic dff_b;     // B(t-1)
  logic dff_b_n;   // not B(t-1) = A(t)
  logic xor_fm0;   // B(t)

  t_ff u_dff_b (
    .clk    (clk),
    .reset_n(reset_n),
    .t      (x),
    .q      (dff_b),
    .q_n    (dff_b_n)
  );

  assign xor_fm0 = x ^ dff_b;

  // mux_out: first half A(t), second half B(t).
  assign y = clk ? dff_b_n : xor_fm0;

endmodule : area_compact_fm0
