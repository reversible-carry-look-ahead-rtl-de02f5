// Self-checking test of the optical Feynman gate over its whole truth
// table (P = A, Q = A xor B), including its use as a copying gate (B = 0),
// and of its reversibility: the four outputs must all differ.
module tb_ofg;
  logic a, b, p, q;
  logic [3:0] seen;
  int checks = 0, failures = 0;

  ofg dut (.a, .b, .p, .q);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b q=%b", a, b, p, q);
      end
      if (!b) begin
        checks++;  // copying gate
        if (p !== a || q !== a) begin
          failures++;
          $display("FAIL copy a=%b p=%b q=%b", a, p, q);
        end
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hf) begin
      failures++;
      $display("FAIL not reversible, outputs seen %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
