// d_flip_flop: rising-edge D flip-flop with asynchronous preset and clear.
//
// Q takes D on each rising edge of clk. The active-low inputs pr_n and clr_n
// act at once, without the clock: pr_n low forces Q=1, clr_n low forces Q=0.
// Q' is the complement of Q. This is the truth table of the classic preset/
// clear D flip-flop.
//
// With both pr_n and clr_n low the table leaves the outputs undefined. This
// design drives both Q and Q' high in that case, as a cross-coupled NAND
// flip-flop does; the stored bit is cleared, so the state after both inputs
// are released is Q=0. That choice is this design's own.
//
// Timing: Q/Q' change after the rising edge of clk, or as soon as pr_n or
// clr_n is asserted. Releasing clr_n while pr_n is still low leaves Q at 0
// until the next clock edge or the next assertion of preset.
module d_flip_flop (
  input  logic clk,
  input  logic pr_n,
  input  logic clr_n,
  input  logic d,
  output logic q,
  output logic q_n
);

  logic state;
  logic both_forced;

  always_ff @(posedge clk or negedge pr_n or negedge clr_n) begin
    if (!clr_n)     state <= 1'b0;
    else if (!pr_n) state <= 1'b1;
    else            state <= d;
  end

  assign both_forced = !pr_n && !clr_n;
  assign q           = both_forced ? 1'b1 : state;
  assign q_n         = both_forced ? 1'b1 : ~state;

endmodule : d_flip_flop
