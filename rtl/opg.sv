// Optical Peres gate: P = A, Q = A xor B, R = AB xor C.
//
// Built from four MZI switches and two beam combiners, in two MZI stages.
// Stage 1: B passes a switch controlled by A (bar = AB, cross = ~A&B) and A
// passes a switch controlled by B (cross = A&~B); the two cross ports are
// combined into Q = A xor B. Stage 2 forms AB xor C the same way, with AB
// and C in the roles of A and B. P is a split copy of A. With C = 0 the gate
// delivers both A xor B and A&B, which the adders use for propagate and
// generate. The truth function is the standard Peres gate; the MZI
// arrangement is this design's own (optical cost 4). Combinational.
module opg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  logic ab, nab, anb, a_b_unused;
  logic abc_unused, nab_c, ab_nc, c_ab_unused;

  // Stage 1: A and B
  mzi_switch u_sw_b  (.in_beam(b),  .ctrl(a),  .bar_port(ab),          .cross_port(nab));
  mzi_switch u_sw_a  (.in_beam(a),  .ctrl(b),  .bar_port(a_b_unused),  .cross_port(anb));
  beam_combiner u_bc_q (.beam_a(nab), .beam_b(anb), .beam_out(q));

  // Stage 2: AB and C
  mzi_switch u_sw_c  (.in_beam(c),  .ctrl(ab), .bar_port(c_ab_unused), .cross_port(nab_c));
  mzi_switch u_sw_ab (.in_beam(ab), .ctrl(c),  .bar_port(abc_unused),  .cross_port(ab_nc));
  beam_combiner u_bc_r (.beam_a(nab_c), .beam_b(ab_nc), .beam_out(r));

  assign p = a;

endmodule
