// tb_mux21: self-checking test of the 2:1 multiplexer mux21.
// Random a, b and s; the expected output is built bit by bit from the
// definition (s = 1 selects a, s = 0 selects b).
module tb_mux21;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, y, want;
  logic s;
  int checks = 0, failures = 0;

  mux21 #(.WIDTH(W)) dut (.a(a), .b(b), .s(s), .y(y));

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = W'($urandom);
      b = W'($urandom);
      s = (i < 2) ? i[0] : 1'($urandom);
      #1;
      for (int k = 0; k < W; k++) want[k] = s ? a[k] : b[k];
      checks++;
      if (y !== want) begin
        failures++;
        $display("FAIL s=%b a=%h b=%h y=%h want %h", s, a, b, y, want);
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
