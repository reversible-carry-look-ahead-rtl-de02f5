// Top level: the two optical reversible carry look-ahead adder designs side
// by side, plus the stand-alone optical Toffoli gate.
//
// Design 1 (Peres and Feynman gates) and design 2 (the same with copying
// Feynman gates on the generate signals) are alternative realisations of
// one 4-bit adder/subtractor, so each is brought out with its own ports
// (d1_*, d2_*) and can be compared against the other. The Toffoli gate is
// part of the gate library but neither adder uses it; its pins are t_*.
// All paths are combinational; there is no clock or reset.
module cla_mzi_top
  import cla_mzi_pkg::*;
#(
  parameter int unsigned WIDTH = CLA_WIDTH
) (
  // design 1
  input  logic [WIDTH-1:0] d1_a,
  input  logic [WIDTH-1:0] d1_b,
  input  logic             d1_cin,
  input  logic             d1_sub,
  output logic [WIDTH-1:0] d1_sum,
  output logic             d1_cout,
  output logic [WIDTH-1:0] d1_g,
  output logic [WIDTH-1:0] d1_p,
  // design 2
  input  logic [WIDTH-1:0] d2_a,
  input  logic [WIDTH-1:0] d2_b,
  input  logic             d2_cin,
  input  logic             d2_sub,
  output logic [WIDTH-1:0] d2_sum,
  output logic             d2_cout,
  output logic [WIDTH-1:0] d2_g,
  output logic [WIDTH-1:0] d2_p,
  // Toffoli gate
  input  logic             t_a,
  input  logic             t_b,
  input  logic             t_c,
  output logic             t_p,
  output logic             t_q,
  output logic             t_r
);

  cla_design1 #(.WIDTH(WIDTH)) u_design1 (
    .a(d1_a), .b(d1_b), .cin(d1_cin), .sub(d1_sub),
    .sum(d1_sum), .cout(d1_cout), .g(d1_g), .p(d1_p)
  );

  cla_design2 #(.WIDTH(WIDTH)) u_design2 (
    .a(d2_a), .b(d2_b), .cin(d2_cin), .sub(d2_sub),
    .sum(d2_sum), .cout(d2_cout), .g(d2_g), .p(d2_p)
  );

  otg u_toffoli (.a(t_a), .b(t_b), .c(t_c), .p(t_p), .q(t_q), .r(t_r));

endmodule
