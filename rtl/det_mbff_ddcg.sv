// det_mbff_ddcg: 32-bit double-edge-triggered multi-bit flip-flop pipeline
// with data-driven clock gating (DDCG) on its second stage.
//
// Structure (instance names as in the reference schematic):
//   m1  DET_mbff  - free-running DET-MBFF, clocked by clk, samples D1 on both
//                   clock edges; its output q1 is the next state of m2.
//   g3  xor_g     - compares q1 with Q2 bit by bit (state-change detection).
//   D3_i          - OR reduction of the XOR bits: en = 1 when any bit of the
//                   gated group would change if clocked.
//   m4  Dlatch    - transparent while clk is low, holds en while clk is high,
//                   so the gated clock cannot glitch.
//   clk_g_i       - AND of clk and the latched enable: clk_g.
//   m2  DET_mbff  - gated DET-MBFF, clocked by clk_g, output Q2.
// When q1 equals Q2 at the end of a low phase, clk_g stays low for the whole
// next clock period and m2's clock tree is idle; otherwise clk_g repeats the
// high pulse of clk and m2 captures on both of its edges.
//
// Timing: q1 takes D1 at every clock edge. The enable is evaluated over each
// low phase of clk, so m2 copies q1 at the rising edge that closes a low
// phase in which they differed, and again at the falling edge of that same
// pulse. A word that q1 takes at a falling edge reaches Q2 at the next rising
// edge; one taken at a rising edge reaches Q2 at the falling edge if the gate
// is open, otherwise at the next rising edge. Q2 therefore lags q1 by one or
// two clock edges. A word that q1 holds only for a high phase during which
// the gate was shut is overwritten before the gate opens and never reaches
// Q2; every word held across a low phase does.
//
// Interface: clk, rst (active high, asynchronous), D1[WIDTH-1:0] ->
//   Q2[WIDTH-1:0], clk_g (the gated clock, brought out for observation).
// The pipeline, names and 32-bit width follow the reference schematic; the
// latch polarity follows its clock-gater drawing; reset style is this
// design's choice.
module det_mbff_ddcg
  import det_pkg::*;
#(
  parameter int unsigned WIDTH = MBFF_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] D1,
  output logic [WIDTH-1:0] Q2,
  output logic             clk_g
);

  logic [WIDTH-1:0] q1;       // m1 output, next state of m2
  logic [WIDTH-1:0] diff;     // bits of m2 that would change
  logic             en;       // group clock enable
  logic             en_l;     // enable as held by the gating latch
  logic             clk_n;

  DET_mbff #(.WIDTH(WIDTH)) m1 (.clk(clk), .rst(rst), .d(D1), .q(q1));

  xor_g #(.WIDTH(WIDTH)) g3 (.a(q1), .b(Q2), .c(diff));

  assign en    = |diff;
  assign clk_n = ~clk;

  Dlatch #(.WIDTH(1)) m4 (.D(en), .en(clk_n), .Q(en_l));

  assign clk_g = clk & en_l;

  DET_mbff #(.WIDTH(WIDTH)) m2 (.clk(clk_g), .rst(rst), .d(q1), .q(Q2));

endmodule
