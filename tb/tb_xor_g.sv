// tb_xor_g: self-checking test of the state-change detector xor_g.
// For random and for equal operand pairs each output bit must be 1 exactly
// where the two inputs differ, and all bits must be 0 when they are equal.
module tb_xor_g;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, c;
  logic want;
  int checks = 0, failures = 0;

  xor_g #(.WIDTH(W)) dut (.a(a), .b(b), .c(c));

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = W'($urandom);
      b = (i % 4 == 0) ? a : (i % 4 == 1) ? (a ^ (W'(1) << (i % W))) : W'($urandom);
      #1;
      for (int k = 0; k < W; k++) begin
        want = (a[k] != b[k]);
        checks++;
        if (c[k] !== want) begin
          failures++;
          $display("FAIL bit %0d: a=%h b=%h c=%h", k, a, b, c);
        end
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
