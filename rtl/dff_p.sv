// dff_p: WIDTH-bit rising-edge register with asynchronous active-high reset.
//
// One half of a flip-flop based DET-MBFF: it captures d on every rising edge
// of clk and holds it until the next rising edge. rst forces q to zero
// immediately, independent of clk (the asynchronous reset is a choice of this
// design; the reference only shows that the register has an rst pin).
//
// Interface: clk, rst (active high), d[WIDTH-1:0] -> q[WIDTH-1:0].
// Timing: q takes d at each rising edge of clk.
module dff_p #(
  parameter int unsigned WIDTH = det_pkg::MBFF_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
