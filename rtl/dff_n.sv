// dff_n: WIDTH-bit falling-edge register with asynchronous active-high reset.
//
// The other half of a flip-flop based DET-MBFF: it captures d on every
// falling edge of clk and holds it until the next falling edge. rst forces q
// to zero immediately (asynchronous reset is this design's choice).
//
// Interface: clk, rst (active high), d[WIDTH-1:0] -> q[WIDTH-1:0].
// Timing: q takes d at each falling edge of clk.
module dff_n #(
  parameter int unsigned WIDTH = det_pkg::MBFF_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(negedge clk or posedge rst) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
