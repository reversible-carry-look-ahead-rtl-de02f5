// Optical Toffoli gate (controlled-controlled NOT): P = A, Q = B,
// R = AB xor C. The third bit is inverted only when both controls are 1.
//
// Three MZI switches and one beam combiner, in two MZI stages: B passes a
// switch controlled by A, whose bar port is AB; C then passes a switch
// controlled by AB and AB a switch controlled by C, and their cross ports
// (~AB&C and AB&~C) are combined into AB xor C. P and Q are split copies of
// A and B. The truth function is the standard Toffoli gate. The usual
// quantum decomposition into controlled-V gates has no two-valued form, so
// this MZI arrangement is this design's own (optical cost 3). Combinational.
module otg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  logic ab, nab_unused, abc_unused, nab_c, ab_nc, c_ab_unused;

  mzi_switch u_sw_b  (.in_beam(b),  .ctrl(a),  .bar_port(ab),          .cross_port(nab_unused));
  mzi_switch u_sw_c  (.in_beam(c),  .ctrl(ab), .bar_port(c_ab_unused), .cross_port(nab_c));
  mzi_switch u_sw_ab (.in_beam(ab), .ctrl(c),  .bar_port(abc_unused),  .cross_port(ab_nc));
  beam_combiner u_bc (.beam_a(nab_c), .beam_b(ab_nc), .beam_out(r));

  assign p = a;
  assign q = b;

endmodule
