// End-to-end test of cla_mzi_top at its default parameters (4-bit adders).
//
// Both adder designs receive every combination of A, B, carry in and mode,
// in different orders, and each is checked against integer arithmetic and
// against the expected generate and propagate bits (design 2's come from
// its copying gates).
// The Toffoli gate is run over its truth table. The two worked examples
// (1011 + 1010 and 1111 + 1101, carry in 0) are checked on their own.
// Each behaviour of the adders is counted and must occur at least once:
// a carry out of an addition, a subtraction with and without a borrow, a
// carry in that propagates through all four bits, a carry generated in
// bit 0 that propagates to the carry out, and a Toffoli inversion.
module tb_cla_mzi_top;
  localparam int unsigned W = 4;

  logic [W-1:0] d1_a, d1_b, d1_sum, d1_g, d1_p;
  logic [W-1:0] d2_a, d2_b, d2_sum, d2_g, d2_p;
  logic d1_cin, d1_sub, d1_cout, d2_cin, d2_sub, d2_cout;
  logic t_a, t_b, t_c, t_p, t_q, t_r;
  int checks = 0, failures = 0;
  int n_add_carry = 0, n_sub_borrow = 0, n_sub_noborrow = 0;
  int n_full_propagate = 0, n_g0_to_cout = 0, n_toffoli_flip = 0;

  cla_mzi_top dut (.*);

  // Expected {cout, sum}, generate and propagate of one adder.
  function automatic logic [3*W:0] model(logic [W-1:0] ta, logic [W-1:0] tb, logic tc, logic ts);
    logic [W-1:0] b_eff = tb ^ {W{ts}};
    logic [W:0] full = (W+1)'(ta) + (W+1)'(b_eff) + (W+1)'(tc ^ ts);
    return {full, ta & b_eff, ta ^ b_eff};
  endfunction

  // Design 1 gets operand set v1 and design 2 operand set v2, each
  // {A, B, cin, sub}; the two sets differ so that the designs' pins cannot
  // be confused with each other.
  task automatic check_pair(logic [2*W+1:0] v1, logic [2*W+1:0] v2);
    logic [3*W:0] e1, e2;
    {d1_a, d1_b, d1_cin, d1_sub} = v1;
    {d2_a, d2_b, d2_cin, d2_sub} = v2;
    #1;
    e1 = model(v1[2*W+1 -: W], v1[W+1 -: W], v1[1], v1[0]);
    e2 = model(v2[2*W+1 -: W], v2[W+1 -: W], v2[1], v2[0]);
    checks++;
    if ({d1_cout, d1_sum, d1_g, d1_p} !== e1) begin
      failures++;
      $display("FAIL design1 in=%b -> cout=%b sum=%b g=%b p=%b", v1, d1_cout, d1_sum, d1_g, d1_p);
    end
    checks++;
    if ({d2_cout, d2_sum, d2_g, d2_p} !== e2) begin
      failures++;
      $display("FAIL design2 in=%b -> cout=%b sum=%b g=%b p=%b", v2, d2_cout, d2_sum, d2_g, d2_p);
    end
    // behaviour counters, on design 1's inputs
    if (!v1[0] && e1[3*W]) n_add_carry++;
    if (v1[0] && !e1[3*W]) n_sub_borrow++;
    if (v1[0] && e1[3*W]) n_sub_noborrow++;
    if (e1[W-1:0] == '1 && (v1[1] ^ v1[0])) n_full_propagate++;
    if (e1[W] && e1[W-1:1] == '1) n_g0_to_cout++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {t_a, t_b, t_c} = '0;

    // worked examples
    check_pair({4'b1011, 4'b1010, 2'b00}, {4'b1111, 4'b1101, 2'b00});
    checks++;
    if (d1_sum !== 4'b0101 || d1_cout !== 1'b1 || d1_g !== 4'b1010 || d1_p !== 4'b0001) begin
      failures++;
      $display("FAIL example 1: sum=%b cout=%b g=%b p=%b", d1_sum, d1_cout, d1_g, d1_p);
    end
    checks++;
    if (d2_sum !== 4'b1100 || d2_cout !== 1'b1 || d2_g !== 4'b1101 || d2_p !== 4'b0010) begin
      failures++;
      $display("FAIL example 2: sum=%b cout=%b g=%b p=%b", d2_sum, d2_cout, d2_g, d2_p);
    end

    // every operand, carry and mode combination
    // Design 2's sequence is v * 37 + 11 modulo 2^(2W+2), a permutation, so
    // both designs see every combination.
    for (int v = 0; v < (1 << (2*W + 2)); v++)
      check_pair((2*W+2)'(v), (2*W+2)'(v * 37 + 11));

    // Toffoli gate
    for (int v = 0; v < 8; v++) begin
      {t_a, t_b, t_c} = 3'(v);
      #1;
      checks++;
      if (t_p !== t_a || t_q !== t_b || t_r !== ((t_a && t_b) != t_c)) begin
        failures++;
        $display("FAIL toffoli %b%b%b -> %b%b%b", t_a, t_b, t_c, t_p, t_q, t_r);
      end
      if (t_a && t_b && (t_r != t_c)) n_toffoli_flip++;
    end

    $display("add with carry out %0d, subtract with borrow %0d, subtract without borrow %0d",
             n_add_carry, n_sub_borrow, n_sub_noborrow);
    $display("carry in through all bits %0d, G0 through all bits %0d, Toffoli inversions %0d",
             n_full_propagate, n_g0_to_cout, n_toffoli_flip);
    checks++;
    if (n_add_carry == 0 || n_sub_borrow == 0 || n_sub_noborrow == 0 ||
        n_full_propagate == 0 || n_g0_to_cout == 0 || n_toffoli_flip == 0) begin
      failures++;
      $display("FAIL a behaviour never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
