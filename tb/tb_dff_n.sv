// tb_dff_n: self-checking test of the falling-edge register dff_n.
// Random data is applied away from the clock edges; after every falling edge q
// must equal the data present at that edge, after every rising edge it must
// be unchanged, and an asynchronous reset pulse in the middle of a phase must
// clear q at once.
module tb_dff_n;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst = 1'b0;
  logic [W-1:0] d = '0, q, exp_q;
  int checks = 0, failures = 0;

  dff_n #(.WIDTH(W)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  task automatic check(input logic [W-1:0] want, input string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("FAIL %s: q=%h want %h at %0t", what, q, want, $time);
    end
  endtask

  initial begin
    #1 rst = 1'b1;
    #1 check('0, "reset");
    rst = 1'b0;
    exp_q = '0;
    for (int i = 0; i < 400; i++) begin
      d = W'($urandom);
      #2 clk = 1'b1;
      #1 check(exp_q, "rising edge holds");
      d = W'($urandom);
      #2 clk = 1'b0;
      exp_q = d;
      #1 check(exp_q, "falling edge");
      if (i % 97 == 50) begin
        rst = 1'b1;
        #1 check('0, "async reset");
        exp_q = '0;
        rst = 1'b0;
      end
      #1;
    end
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
