// Self-checking test of cla_design2, the 4-bit optical reversible carry
// look-ahead adder/subtractor. Every combination of A, B, carry in and mode
// (1024 cases) is applied and checked against
//   - plain integer arithmetic: {cout, sum} = A + (B xor sub) + (cin xor sub),
//   - generate and propagate vectors: G = A & B', P = A xor B',
//   - the carry out written as the expanded look-ahead expression
//     C4 = G3 ^ P3 G2 ^ P3 P2 G1 ^ P3 P2 P1 G0 ^ P3 P2 P1 P0 C0.
// The worked example A = 1111, B = 1101, cin = 0 is checked on its own, and
// the MZI count of the instance against the hand count 14W + 2 (58 at W = 4).
module tb_cla_design2;
  import cla_mzi_pkg::*;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, sum, g, p;
  logic cin, sub, cout;
  int checks = 0, failures = 0;

  cla_design2 #(.WIDTH(W)) dut (.a, .b, .cin, .sub, .sum, .cout, .g, .p);

  // Expanded look-ahead carry out of bit W-1 from the G and P vectors.
  function automatic logic lookahead_cout(logic [W-1:0] gv, logic [W-1:0] pv, logic c0);
    logic acc = 1'b0;
    logic prod;
    for (int j = -1; j < int'(W); j++) begin
      // term: P(W-1)..P(j+1) times (G(j), or C0 for j = -1)
      prod = (j < 0) ? c0 : gv[j];
      for (int k = j + 1; k < int'(W); k++) prod &= pv[k];
      acc ^= prod;
    end
    return acc;
  endfunction

  task automatic apply_and_check(logic [W-1:0] ta, logic [W-1:0] tb, logic tc, logic ts);
    logic [W-1:0] b_eff;
    logic [W:0] expect_full;
    a = ta; b = tb; cin = tc; sub = ts;
    #1;
    b_eff = tb ^ {W{ts}};
    expect_full = (W+1)'(ta) + (W+1)'(b_eff) + (W+1)'(tc ^ ts);
    checks++;
    if ({cout, sum} !== expect_full) begin
      failures++;
      $display("FAIL a=%b b=%b cin=%b sub=%b -> cout=%b sum=%b, expected %b",
               ta, tb, tc, ts, cout, sum, expect_full);
    end
    checks++;
    if (g !== (ta & b_eff) || p !== (ta ^ b_eff)) begin
      failures++;
      $display("FAIL a=%b b=%b sub=%b -> g=%b p=%b", ta, tb, ts, g, p);
    end
    checks++;
    if (cout !== lookahead_cout(ta & b_eff, ta ^ b_eff, tc ^ ts)) begin
      failures++;
      $display("FAIL look-ahead carry a=%b b=%b cin=%b sub=%b", ta, tb, tc, ts);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example (4-bit operands; skipped at other widths)
    if (W == 4) begin
      apply_and_check(W'(4'b1111), W'(4'b1101), 1'b0, 1'b0);
      checks++;
      if (sum !== W'(4'b1100) || cout !== 1'b1) begin
        failures++;
        $display("FAIL example: sum=%b cout=%b", sum, cout);
      end
    end
    // exhaustive
    for (int v = 0; v < (1 << (2*W + 2)); v++)
      apply_and_check(v[2*W+1 -: W], v[W+1 -: W], v[1], v[0]);
    checks++;
    if (dut.OPTICAL_COST != 14 * W + 2 || design2_cost(W) != 14 * W + 2) begin
      failures++;
      $display("FAIL optical cost %0d", dut.OPTICAL_COST);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
