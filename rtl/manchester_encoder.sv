// manchester_encoder: Manchester (phase) line encoder.
//
// Each data bit is sent as two half-bit levels of opposite value, so every
// bit carries a transition in its middle and the code has no DC component.
// The output is y = x xor clk: with clk high in the first half of the bit
// period, a 1 is sent low-then-high and a 0 high-then-low (the IEEE 802.3
// convention). The choice of XOR rather than XNOR is this design's own.
//
// Interface: clk is the bit clock, high for the first half of each bit; x
// must be stable for the whole period from one rising edge of clk to the
// next. The encoder has no state; y follows clk and x combinationally.
module manchester_encoder (
  input  logic clk,
  input  logic x,
  output logic y
);

  assign y = x ^ clk;

endmodule : manchester_encoder
