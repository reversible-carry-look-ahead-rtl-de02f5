// Self-checking test of the beam combiner: the three legal input cases
// (at most one beam lit) must give light out exactly when a beam is lit.
module tb_beam_combiner;
  logic beam_a, beam_b, beam_out;
  int checks = 0, failures = 0;

  beam_combiner dut (.beam_a, .beam_b, .beam_out);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 3; v++) begin
      {beam_a, beam_b} = 2'(v);
      #1;
      checks++;
      if (beam_out !== (v != 0)) begin
        failures++;
        $display("FAIL a=%b b=%b out=%b", beam_a, beam_b, beam_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
