// tb_DET_mbff: self-checking test of the double-edge-triggered multi-bit
// flip-flop, in both of its forms (two edge registers plus a mux, and two
// complementary latches plus a mux), side by side on the same inputs.
//
// Data is changed in the middle of every clock phase. After each edge, rising
// or falling, both outputs must equal the data present at that edge, and a
// change of d in the middle of a phase must not reach q (the register is
// never transparent). The test also counts how many distinct words each
// output delivers per clock period: a double-edge register must deliver two.
// Reset: the flop form clears at once, the latch form from the next edge.
module tb_DET_mbff;
  import det_pkg::*;
  localparam int unsigned W = 32;
  localparam int unsigned PERIODS = 300;
  logic clk = 1'b0, rst = 1'b0;
  logic [W-1:0] d = '0, q_f, q_l, exp_q;
  int checks = 0, failures = 0;
  int words_f = 0, words_l = 0;

  DET_mbff #(.WIDTH(W), .STYLE(DET_FLOP_MUX))  dut_f (.clk(clk), .rst(rst), .d(d), .q(q_f));
  DET_mbff #(.WIDTH(W), .STYLE(DET_LATCH_MUX)) dut_l (.clk(clk), .rst(rst), .d(d), .q(q_l));

  task automatic check(input logic [W-1:0] want, input string what);
    checks += 2;
    if (q_f !== want) begin
      failures++;
      $display("FAIL flop form %s: q=%h want %h at %0t", what, q_f, want, $time);
    end
    if (q_l !== want) begin
      failures++;
      $display("FAIL latch form %s: q=%h want %h at %0t", what, q_l, want, $time);
    end
  endtask

  task automatic half_period(input logic edge_val);
    logic [W-1:0] before_f, before_l;
    d = W'($urandom);
    #2;
    before_f = q_f;
    before_l = q_l;
    clk = edge_val;
    exp_q = d;
    #1 check(exp_q, edge_val ? "rising edge" : "falling edge");
    if (q_f != before_f) words_f++;
    if (q_l != before_l) words_l++;
    d = ~d;                      // mid-phase change: must not pass through
    #1 check(exp_q, "not transparent");
    #1;
  endtask

  initial begin
    // reset held over two edges so that the latch form is cleared as well
    #1 rst = 1'b1;
    #1 clk = 1'b1;
    #3 clk = 1'b0;
    #1 check('0, "reset");
    rst = 1'b0;
    for (int i = 0; i < PERIODS; i++) begin
      half_period(1'b1);
      half_period(1'b0);
    end
    // two new words per clock period (random data repeats with tiny odds)
    checks++;
    if (words_f < 2 * PERIODS - 2 || words_l < 2 * PERIODS - 2) begin
      failures++;
      $display("FAIL rate: %0d / %0d words in %0d periods", words_f, words_l, PERIODS);
    end else
      $display("rate: %0d words in %0d clock periods (flop), %0d (latch)",
               words_f, PERIODS, words_l);
    // asynchronous reset of the flop form in the middle of a phase
    #2 rst = 1'b1;
    #1 begin
      checks++;
      if (q_f !== '0) begin failures++; $display("FAIL flop form async reset"); end
    end
    clk = 1'b1;
    #1 check('0, "reset at edge");
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
