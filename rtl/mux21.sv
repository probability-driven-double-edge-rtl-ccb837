// mux21: WIDTH-bit 2:1 multiplexer, y = s ? a : b.
//
// In a DET-MBFF the select s is the clock itself, so the output follows
// whichever storage half most recently captured (or, for latches, whichever
// half is currently holding). Purely combinational; which input s = 1 picks
// is this design's choice, made so that the flip-flop form below works.
//
// Interface: a, b [WIDTH-1:0], s -> y [WIDTH-1:0]. No clock, no latency.
module mux21 #(
  parameter int unsigned WIDTH = det_pkg::MBFF_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             s,
  output logic [WIDTH-1:0] y
);

  always_comb y = s ? a : b;

endmodule
