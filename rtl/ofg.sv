// Optical Feynman gate (controlled NOT): P = A, Q = A xor B.
//
// Two MZI switches and one beam combiner. B passes a switch controlled by A
// and A passes a switch controlled by B; the cross ports carry ~A&B and
// A&~B, which never light together, so combining them yields A xor B.
// P is a split copy of A. With B tied to 0 the gate copies A onto both
// outputs, which is how the adders use it to fan a signal out.
// The truth function is the standard Feynman gate; the MZI arrangement is
// this design's own (optical cost 2, one MZI stage). Combinational.
module ofg (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  logic ab_unused, nab, anb, ab2_unused;

  // B under control of A: cross port = ~A & B
  mzi_switch u_sw_b (.in_beam(b), .ctrl(a), .bar_port(ab_unused),  .cross_port(nab));
  // A under control of B: cross port = A & ~B
  mzi_switch u_sw_a (.in_beam(a), .ctrl(b), .bar_port(ab2_unused), .cross_port(anb));

  beam_combiner u_bc (.beam_a(nab), .beam_b(anb), .beam_out(q));

  assign p = a;

endmodule
