// Self-checking test of the optical Peres gate over its whole truth table
// (P = A, Q = A xor B, R = AB xor C), and of its reversibility: the eight outputs must all differ.
module tb_opg;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  opg dut (.a, .b, .c, .p, .q, .r);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b) || r !== ((a && b) != c)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> p=%b q=%b r=%b", a, b, c, p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin
      failures++;
      $display("FAIL not reversible, outputs seen %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
