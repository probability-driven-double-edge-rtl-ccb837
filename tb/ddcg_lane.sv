// ddcg_lane: one lane of the group-size sweep. It drives a det_mbff_ddcg of
// width W with data whose bits each flip with probability PPM / 1e6 at every
// clock edge, runs a behavioural reference of the gated pipeline beside it,
// and counts checks, failures, clock pulses gated off and clock periods.
//
// The reference only uses its own copies of the state: q1 takes D1 at every
// edge; the gate for a clock pulse is open when q1 differs from Q2 just
// before the rising edge; while it is open Q2 takes q1 at both edges of the
// pulse. D1 is changed 2 time units after each edge, outputs are compared
// 1 time unit after each edge. Clock period expected: 10 time units.
module ddcg_lane #(
  parameter int unsigned W   = 8,
  parameter int unsigned PPM = 10000
) (
  input  logic clk,
  input  logic rst,
  input  logic run,
  output int   checks,
  output int   failures,
  output int   gated,
  output int   periods
);
  logic [W-1:0] D1 = '0, Q2;
  logic         clk_g;
  logic [W-1:0] q1_ref = '0, q2_ref = '0;
  logic         gate_ref = 1'b0;

  det_mbff_ddcg #(.WIDTH(W)) dut (.clk(clk), .rst(rst), .D1(D1), .Q2(Q2), .clk_g(clk_g));

  initial begin
    checks = 0; failures = 0; gated = 0; periods = 0;
  end

  function automatic logic [W-1:0] toggle(input logic [W-1:0] v);
    logic [W-1:0] r;
    int unsigned  u;
    r = v;
    for (int k = 0; k < W; k++) begin
      u = $urandom_range(999999);
      if (u < PPM) r[k] = ~r[k];
    end
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      q1_ref = '0; q2_ref = '0; gate_ref = 1'b0;
    end else begin
      gate_ref = (q1_ref != q2_ref);
      if (gate_ref) q2_ref = q1_ref;
      q1_ref = D1;
      if (run) begin
        periods++;
        if (!gate_ref) gated++;
      end
    end
  end

  always @(negedge clk) begin
    if (rst) begin
      q1_ref = '0; q2_ref = '0;
    end else begin
      if (gate_ref) q2_ref = q1_ref;
      q1_ref = D1;
    end
  end

  always @(clk) begin
    #1;
    checks += 2;
    if (Q2 !== q2_ref) begin
      failures++;
      if (failures < 5) $display("FAIL W=%0d: Q2=%h want %h at %0t", W, Q2, q2_ref, $time);
    end
    if (clk_g !== (clk & gate_ref & !rst)) begin
      failures++;
      if (failures < 5) $display("FAIL W=%0d: clk_g=%b at %0t", W, clk_g, $time);
    end
    #1;
    if (run) D1 = toggle(D1);
  end
endmodule
