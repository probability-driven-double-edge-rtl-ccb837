// tb_Dlatch: self-checking test of the level-sensitive latch Dlatch.
// While en = 1 the output must follow every change of D; when en falls the
// last value is kept, and later changes of D must not reach Q until en rises
// again.
module tb_Dlatch;
  localparam int unsigned W = 8;
  logic [W-1:0] D, Q, held;
  logic en;
  int checks = 0, failures = 0;

  Dlatch #(.WIDTH(W)) dut (.D(D), .en(en), .Q(Q));

  task automatic check(input logic [W-1:0] want, input string what);
    checks++;
    if (Q !== want) begin
      failures++;
      $display("FAIL %s: Q=%h want %h at %0t", what, Q, want, $time);
    end
  endtask

  initial begin
    en = 1'b1;
    D  = '0;
    #1 check('0, "transparent");
    for (int i = 0; i < 200; i++) begin
      en = 1'b1;
      for (int j = 0; j < 3; j++) begin
        D = W'($urandom);
        #1 check(D, "transparent follows D");
      end
      held = D;
      en = 1'b0;
      #1 check(held, "hold after en falls");
      for (int j = 0; j < 3; j++) begin
        D = ~held ^ W'(j);
        #1 check(held, "opaque ignores D");
      end
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
