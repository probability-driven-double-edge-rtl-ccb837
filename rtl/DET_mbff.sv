// DET_mbff: WIDTH-bit double-edge-triggered multi-bit flip-flop.
//
// All WIDTH bits share one clock input, so one clock driver serves the whole
// group. The register takes new data on both the rising and the falling edge
// of clk, i.e. two words per clock period, so the same data rate needs half
// the clock frequency of a single-edge register.
//
// STYLE = DET_FLOP_MUX (default, the synthesised structure):
//   dff_p (m1) captures d on the rising edge, dff_n (m2) on the falling edge,
//   and mux21 (m3) shows dff_p while clk is high and dff_n while clk is low,
//   so q is always the most recent capture. The reference drives the mux
//   select with clk itself. Here the select comes from a one-bit copy of the
//   same double-edge structure (m_tp, m_tn), which has the value of clk but
//   changes only as a register output. With clk on the select, q would show
//   the stale half for a moment after every edge (the select moves before the
//   new data arrives), and a register clocked by the same edge, such as the
//   second stage of det_mbff_ddcg, could capture that stale word. With the
//   tracked select q goes straight from the old word to the new one.
// STYLE = DET_LATCH_MUX ("side-by-side" form):
//   a latch transparent while clk = 1 and a complementary latch transparent
//   while clk = 0 sit in parallel on d. The mux always connects the output to
//   the latch that is holding (the low-transparent one while clk = 1), so q
//   is never transparent to d and changes only at clock edges. The latches
//   have no reset pin, so here rst forces zero into their D inputs; q reads
//   zero from the first clock edge after rst rises.
//
// Interface: clk, rst (active high, asynchronous in the flop form),
//   d [WIDTH-1:0] -> q [WIDTH-1:0].
// Timing: q takes the value d had at each edge of clk, either direction.
// The flop form with async reset and the mux polarity are choices of this
// design; the structure itself follows the reference schematic.
module DET_mbff
  import det_pkg::*;
#(
  parameter int unsigned WIDTH = MBFF_WIDTH,
  parameter det_style_e  STYLE = DET_FLOP_MUX
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (STYLE == DET_FLOP_MUX) begin : g_flop
    logic [WIDTH-1:0] q_p, q_n;
    logic             t_p, t_n, t_p_nxt, sel;

    dff_p #(.WIDTH(WIDTH)) m1 (.clk(clk), .rst(rst), .d(d), .q(q_p));
    dff_n #(.WIDTH(WIDTH)) m2 (.clk(clk), .rst(rst), .d(d), .q(q_n));

    // Edge tracker: t_p toggles away from t_n on each rising edge, t_n
    // copies t_p on each falling edge, so sel = t_p ^ t_n is 1 from a rising
    // edge to the next falling edge, i.e. it equals clk, but it switches
    // together with q_p / q_n instead of ahead of them.
    assign t_p_nxt = ~t_n;
    dff_p #(.WIDTH(1)) m_tp (.clk(clk), .rst(rst), .d(t_p_nxt), .q(t_p));
    dff_n #(.WIDTH(1)) m_tn (.clk(clk), .rst(rst), .d(t_p),     .q(t_n));
    assign sel = t_p ^ t_n;

    // The tracker is back in step with the clock by every rising edge: just
    // before one, the falling-edge half must be selected.
    a_sel_in_step: assert property (@(posedge clk) !sel)
      else $error("DET_mbff: mux select out of step with the clock");

    mux21 #(.WIDTH(WIDTH)) m3 (.a(q_p), .b(q_n), .s(sel), .y(q));
  end else begin : g_latch
    logic [WIDTH-1:0] d_in, q_hi, q_lo;
    logic             clk_n;

    assign d_in  = rst ? '0 : d;
    assign clk_n = ~clk;

    // q_hi is transparent while clk = 1 and holds the value taken at the
    // falling edge; q_lo is transparent while clk = 0 and holds the value
    // taken at the rising edge.
    Dlatch #(.WIDTH(WIDTH)) l_hi (.D(d_in), .en(clk),   .Q(q_hi));
    Dlatch #(.WIDTH(WIDTH)) l_lo (.D(d_in), .en(clk_n), .Q(q_lo));
    mux21  #(.WIDTH(WIDTH)) m3   (.a(q_lo), .b(q_hi), .s(clk), .y(q));
  end

endmodule
