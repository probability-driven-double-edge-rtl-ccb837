// tb_ddcg_multiplicity: group-size sweep of the gated DET-MBFF pipeline.
//
// Sixteen lanes run side by side: groups of 2, 4, 8 and 32 bits, each at
// per-bit toggle activities of 0.01, 0.02, 0.05 and 0.1 per clock edge. Every
// lane checks its pipeline against a behavioural reference (see ddcg_lane)
// and counts the clock pulses its gater suppressed. The printed table is the
// fraction of gated-off pulses; it must fall as the group grows (more bits
// share one enable) and as the activity rises, which is the trade-off that
// decides how many flip-flops to put under one gated clock.
module tb_ddcg_multiplicity;
  localparam int unsigned PERIODS = 4000;
  localparam int NK = 4, NP = 4;
  localparam int unsigned KS  [NK] = '{2, 4, 8, 32};
  localparam int unsigned PPMS[NP] = '{10000, 20000, 50000, 100000};

  logic clk = 1'b0, rst = 1'b0, run = 1'b0;
  int   c  [NK][NP];
  int   f  [NK][NP];
  int   g  [NK][NP];
  int   n  [NK][NP];
  real  frac [NK][NP];
  int   checks = 0, failures = 0;

  for (genvar i = 0; i < NK; i++) begin : g_k
    for (genvar j = 0; j < NP; j++) begin : g_p
      ddcg_lane #(.W(KS[i]), .PPM(PPMS[j])) lane (
        .clk(clk), .rst(rst), .run(run),
        .checks(c[i][j]), .failures(f[i][j]), .gated(g[i][j]), .periods(n[i][j]));
    end
  end

  always #5 clk = ~clk;

  initial begin
    #1 rst = 1'b1;
    repeat (2) @(negedge clk);
    #3 rst = 1'b0;
    @(negedge clk);
    #3 run = 1'b1;
    repeat (PERIODS) @(negedge clk);
    run = 1'b0;
    #9;
    for (int i = 0; i < NK; i++)
      for (int j = 0; j < NP; j++) begin
        checks   += c[i][j];
        failures += f[i][j];
        frac[i][j] = real'(g[i][j]) / real'(n[i][j]);
      end
    $display("gated-off clock pulses   p=0.01  p=0.02  p=0.05  p=0.10");
    for (int i = 0; i < NK; i++)
      $display("  %2d-bit group           %5.1f%%  %5.1f%%  %5.1f%%  %5.1f%%", KS[i],
               100.0 * frac[i][0], 100.0 * frac[i][1], 100.0 * frac[i][2], 100.0 * frac[i][3]);
    for (int i = 0; i < NK; i++)
      for (int j = 0; j < NP; j++) begin
        if (i > 0) begin
          checks++;
          if (!(frac[i][j] < frac[i-1][j])) begin
            failures++; $display("FAIL gating does not fall with group size at K=%0d", KS[i]);
          end
        end
        if (j > 0) begin
          checks++;
          if (!(frac[i][j] < frac[i][j-1])) begin
            failures++; $display("FAIL gating does not fall with activity at K=%0d", KS[i]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
