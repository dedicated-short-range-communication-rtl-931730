// t_ff: toggle flip-flop made of a D flip-flop and an XOR gate.
//
// On each rising edge of clk the state keeps its value when t=0 and is
// complemented when t=1: Q(n+1) = T xor Q(n). The XOR feeds D, as in the
// usual construction of a T flip-flop from a D flip-flop. reset_n (active
// low, asynchronous) clears the state through the D flip-flop's clear input;
// the preset input is not used. The reset is this design's own addition.
//
// Timing: q and q_n change after the rising edge of clk.
module t_ff (
  input  logic clk,
  input  logic reset_n,
  input  logic t,
  output logic q,
  output logic q_n
);

  logic d_in;

  assign d_in = t ^ q;

  d_flip_flop u_dff (
    .clk  (clk),
    .pr_n (1'b1),
    .clr_n(reset_n),
    .d    (d_in),
    .q    (q),
    .q_n  (q_n)
  );

endmodule : t_ff
