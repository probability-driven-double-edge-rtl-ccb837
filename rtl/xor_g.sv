// xor_g: WIDTH-bit bitwise XOR, the state-change detector of data-driven
// clock gating.
//
// a is the next state (the D input of the gated register) and b its current
// state (its Q output); a bit of c is 1 where that flip-flop would change if
// clocked. The OR of all bits of c is the group's clock enable.
//
// Interface: a, b [WIDTH-1:0] -> c [WIDTH-1:0]. Combinational.
// Name, pins and role follow the reference schematic; the OR reduction is
// kept outside, in the top, as it is drawn there.
module xor_g #(
  parameter int unsigned WIDTH = det_pkg::MBFF_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] c
);

  always_comb c = a ^ b;

endmodule
