// Self-checking test of the MZI switch model: all four combinations of
// signal and control beam, checking that the signal reaches the bar port
// only under a control pulse and the cross port only without one.
module tb_mzi_switch;
  logic in_beam, ctrl, bar_port, cross_port;
  int checks = 0, failures = 0;

  mzi_switch dut (.in_beam, .ctrl, .bar_port, .cross_port);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {in_beam, ctrl} = 2'(v);
      #1;
      checks++;
      // switched state: light to bar; unswitched: light to cross
      if (bar_port !== (in_beam && ctrl) || cross_port !== (in_beam && !ctrl)) begin
        failures++;
        $display("FAIL in=%b ctrl=%b bar=%b cross=%b", in_beam, ctrl, bar_port, cross_port);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
