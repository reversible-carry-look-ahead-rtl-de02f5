// Optical beam combiner, logic-level model.
//
// Merges two beams into one, so light leaves whenever either input carries
// it (OR). Every gate in this design joins only beams that cannot be lit at
// the same time, which makes the combiner act as an XOR of its inputs; a
// deferred assertion flags any use that breaks that rule. Combiners (and
// splitters) are treated as having no optical cost and no delay.
// Purely combinational, no clock.
module beam_combiner (
  input  logic beam_a,
  input  logic beam_b,
  output logic beam_out
);

  always_comb begin
    beam_out = beam_a | beam_b;
  end

  // Both beams lit at once would mean the surrounding gate is miswired.
  always_comb begin
    assert final (!(beam_a && beam_b))
      else $error("beam_combiner: both input beams lit");
  end

endmodule
