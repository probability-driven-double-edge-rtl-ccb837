// tb_det_mbff_ddcg: end-to-end, self-checking test of the 32-bit DET-MBFF
// pipeline with data-driven clock gating, at the design's default size.
//
// The testbench drives clk itself, one half period at a time, and changes D1
// only in the middle of a phase. A behavioural reference model, written from
// the intended behaviour rather than from the netlist, runs alongside:
//   - the first stage q1 takes D1 at every clock edge;
//   - the gate for the coming clock pulse is open when q1 differs from Q2 at
//     the end of the low phase;
//   - while the gate is open Q2 takes q1 at the rising and at the falling
//     edge of that pulse, and clk_g repeats the clock; otherwise clk_g stays
//     low and Q2 holds.
// After every edge and in the middle of every phase, Q2, the internal q1 and
// clk_g are compared with the model.
//
// Stimulus: reset; the word 32'h75675437 held constant; per-bit toggle
// activities of 0.01, 0.02, 0.05 and 0.1 per clock edge; fully random words;
// a second reset in mid-run. Each mechanism of the design is counted and must
// occur at least once: clock pulses gated off, pulses let through, Q2 updated
// on both edges of one pulse, a rising-edge change of q1 picked up only on the
// next pulse, q1 taking new data on both edges of one period, a word held by
// q1 only for a gated-off high phase and so never passed on, and reset.
// The fraction of gated pulses must fall as the activity rises.
module tb_det_mbff_ddcg;
  localparam int unsigned W = 32;
  localparam int unsigned PERIODS_PER_ACTIVITY = 2000;

  logic         clk = 1'b0, rst = 1'b0;
  logic [W-1:0] D1 = '0;
  logic [W-1:0] Q2;
  logic         clk_g;

  det_mbff_ddcg dut (.clk(clk), .rst(rst), .D1(D1), .Q2(Q2), .clk_g(clk_g));

  // reference model state
  logic [W-1:0] q1_ref = '0, q2_ref = '0;
  logic         gate_ref = 1'b0;

  int checks = 0, failures = 0;
  int n_gated = 0, n_open = 0, n_both_edges = 0, n_late = 0, n_q1_both = 0, n_reset = 0;
  int n_skipped = 0;
  int gated_in_run, periods_in_run;
  real suppression [4];
  int  act_ppm [4] = '{10000, 20000, 50000, 100000};   // 0.01 .. 0.1

  task automatic check_all(input string what);
    checks += 3;
    if (Q2 !== q2_ref) begin
      failures++;
      $display("FAIL %s: Q2=%h want %h at %0t", what, Q2, q2_ref, $time);
    end
    if (dut.q1 !== q1_ref) begin
      failures++;
      $display("FAIL %s: q1=%h want %h at %0t", what, dut.q1, q1_ref, $time);
    end
    if (clk_g !== (clk & gate_ref)) begin
      failures++;
      $display("FAIL %s: clk_g=%b want %b at %0t", what, clk_g, clk & gate_ref, $time);
    end
  endtask

  // next D1 value: each bit flips with probability ppm / 1e6
  function automatic logic [W-1:0] toggle(input logic [W-1:0] v, input int ppm);
    logic [W-1:0] r;
    int unsigned  u;
    r = v;
    for (int k = 0; k < W; k++) begin
      u = $urandom_range(999999);
      if (u < ppm) r[k] = ~r[k];
    end
    return r;
  endfunction

  // One clock period: low phase already running; rising edge, high phase,
  // falling edge. nxt_hi / nxt_lo are the D1 values for the two edges.
  task automatic period(input logic [W-1:0] nxt_hi, input logic [W-1:0] nxt_lo);
    logic [W-1:0] q2_before, q1_at_rise_old;
    logic         q1_changed_rise, q2_changed_rise;
    // low phase: D1 set for the rising edge, gate decided at its end
    D1 = nxt_hi;
    #2 check_all("low phase");
    gate_ref = (q1_ref != q2_ref);
    // rising edge
    q2_before      = q2_ref;
    q1_at_rise_old = q1_ref;
    clk = 1'b1;
    if (gate_ref) q2_ref = q1_ref;
    q1_ref = D1;
    q1_changed_rise = (q1_ref != q1_at_rise_old);
    q2_changed_rise = (q2_ref != q2_before);
    #1 check_all("rising edge");
    D1 = nxt_lo;
    #2 check_all("high phase");
    if (gate_ref) n_open++; else n_gated++;
    if (!gate_ref) gated_in_run++;
    periods_in_run++;
    if (!gate_ref && q1_changed_rise) n_late++;
    // falling edge
    q2_before = q2_ref;
    clk = 1'b0;
    if (gate_ref) q2_ref = q1_ref;
    if (q1_changed_rise && D1 != q1_ref) n_q1_both++;
    if (!gate_ref && q1_changed_rise && D1 != q1_ref) n_skipped++;
    q1_ref = D1;
    if (q2_changed_rise && q2_ref != q2_before) n_both_edges++;
    #1 check_all("falling edge");
    #1;
  endtask

  task automatic do_reset();
    #1 rst = 1'b1;
    q1_ref = '0;
    q2_ref = '0;
    #1 begin
      checks += 2;
      if (Q2 !== '0)      begin failures++; $display("FAIL reset Q2=%h", Q2); end
      if (dut.q1 !== '0)  begin failures++; $display("FAIL reset q1=%h", dut.q1); end
    end
    D1 = '0;
    period('0, '0);
    rst = 1'b0;
    n_reset++;
  endtask

  initial begin
    logic [W-1:0] v;
    do_reset();
    gate_ref = 1'b0;

    // constant word: passes once, then the gate stays shut
    for (int i = 0; i < 20; i++) period(32'h75675437, 32'h75675437);
    checks++;
    if (Q2 !== 32'h75675437) begin failures++; $display("FAIL constant word Q2=%h", Q2); end

    // activity sweep
    for (int a = 0; a < 4; a++) begin
      gated_in_run = 0;
      periods_in_run = 0;
      v = D1;
      for (int i = 0; i < PERIODS_PER_ACTIVITY; i++) begin
        logic [W-1:0] v_hi, v_lo;
        v_hi = toggle(v, act_ppm[a]);
        v_lo = toggle(v_hi, act_ppm[a]);
        v = v_lo;
        period(v_hi, v_lo);
      end
      suppression[a] = real'(gated_in_run) / real'(periods_in_run);
      $display("activity %0.2f per bit per edge: %0.1f%% of clock pulses gated off",
               act_ppm[a] / 1.0e6, 100.0 * suppression[a]);
    end
    for (int a = 1; a < 4; a++) begin
      checks++;
      if (!(suppression[a] < suppression[a-1])) begin
        failures++;
        $display("FAIL gating does not fall with activity");
      end
    end

    // random words, with a reset in the middle
    for (int i = 0; i < 300; i++) period(W'($urandom), W'($urandom));
    do_reset();
    for (int i = 0; i < 300; i++)
      if (i % 3 == 0) period(W'($urandom), D1); else period(D1, D1);

    // every mechanism must have happened
    checks += 7;
    if (n_skipped == 0)    begin failures++; $display("FAIL no high-phase-only word skipped"); end
    if (n_gated == 0)      begin failures++; $display("FAIL no gated pulse"); end
    if (n_open == 0)       begin failures++; $display("FAIL no open pulse"); end
    if (n_both_edges == 0) begin failures++; $display("FAIL no two-edge update of Q2"); end
    if (n_late == 0)       begin failures++; $display("FAIL no late pick-up"); end
    if (n_q1_both == 0)    begin failures++; $display("FAIL q1 never changed on both edges"); end
    if (n_reset < 2)       begin failures++; $display("FAIL reset count"); end
    $display("gated=%0d open=%0d Q2_both_edges=%0d late_pickup=%0d q1_both_edges=%0d skipped=%0d resets=%0d",
             n_gated, n_open, n_both_edges, n_late, n_q1_both, n_skipped, n_reset);
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
