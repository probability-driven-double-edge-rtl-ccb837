// Dlatch: WIDTH-bit level-sensitive D latch, transparent while en = 1.
//
// Next state Q' = D & en | Q & ~en: while en is high the output follows D,
// while en is low it holds the value D had when en fell. Driving en with an
// inverted clock gives the complementary latch (Q' = D & ~CLK | Q & CLK).
// Two uses in this design:
//   - the glitch-blocking latch of the clock gater (en = ~clk, one bit), so
//     the enable can only change while the clock is low;
//   - the two storage halves of the latch form of the DET-MBFF.
// The latch has no reset, as in the reference schematic; it is loaded within
// one clock phase of use. The WIDTH parameter is this design's addition.
//
// Interface: D [WIDTH-1:0], en -> Q [WIDTH-1:0].
module Dlatch #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] D,
  input  logic             en,
  output logic [WIDTH-1:0] Q
);

  always_latch begin
    if (en) Q <= D;
  end

endmodule
