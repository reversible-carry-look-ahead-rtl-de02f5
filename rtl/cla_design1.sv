// Reversible carry look-ahead adder/subtractor, design 1, built from
// optical Peres (OPG) and Feynman (OFG) gates on MZI switches.
//
// Each bit i takes three steps:
//   1. OPG(Ai, Bi', 0) gives the propagate Pi = Ai xor Bi' (Q output) and
//      the generate Gi = Ai & Bi' (R output).
//   2. OPG(Pi, Ci, 0) gives the sum Si = Pi xor Ci and the term Pi & Ci.
//   3. OFG(Gi, Pi&Ci) gives Ci+1 = Gi xor Pi&Ci.
// Step 3 uses xor in place of the OR of the textbook carry Gi + Pi.Ci: Gi
// and Pi cannot both be 1, so the two forms agree, and an xor is a single
// reversible gate. Expanded, Ci+1 is the look-ahead sum of products
// G(i) xor P(i)G(i-1) xor ... xor P(i)..P(0)C0.
//
// Subtraction is selected by sub = 1: Feynman gates controlled by sub turn
// each Bi into Bi' = Bi xor sub and the carry in into C0 = cin xor sub, so
// sub = 1, cin = 0 gives A - B in two's complement and cout = 1 means no
// borrow. The gate steps and the Eq.-7 carry follow the design; the width
// (4, from its examples) is a parameter, and the exact subtract wiring is
// this design's own choice since only the add/subtract function is given.
//
// Ports: a, b, cin, sub in; sum, cout and the internal g and p vectors out.
// Purely combinational; the path runs through the carry gates bit by bit.
module cla_design1
  import cla_mzi_pkg::*;
#(
  parameter int unsigned WIDTH = CLA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             sub,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] p
);

  // Number of MZI switches in this instance.
  localparam int unsigned OPTICAL_COST = design1_cost(WIDTH);

  logic [WIDTH:0]   c;          // carries, c[0] = carry in after the mode gate
  logic [WIDTH-1:0] b_eff;      // Bi xor sub
  logic [WIDTH-1:0] pc;         // Pi & Ci
  logic [WIDTH-1:0] sub_copy_unused, a_copy_unused, p_copy_unused, g_copy_unused;
  logic             sub_c_unused;

  ofg u_mode_cin (.a(sub), .b(cin), .p(sub_c_unused), .q(c[0]));

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ofg u_mode_b (.a(sub), .b(b[i]), .p(sub_copy_unused[i]), .q(b_eff[i]));

    // Step 1: propagate and generate
    opg u_pg  (.a(a[i]), .b(b_eff[i]), .c(1'b0),
               .p(a_copy_unused[i]), .q(p[i]), .r(g[i]));
    // Step 2: sum and Pi & Ci
    opg u_sum (.a(p[i]), .b(c[i]), .c(1'b0),
               .p(p_copy_unused[i]), .q(sum[i]), .r(pc[i]));
    // Step 3: carry out, Eq. 7
    ofg u_cry (.a(g[i]), .b(pc[i]), .p(g_copy_unused[i]), .q(c[i+1]));
  end

  assign cout = c[WIDTH];

endmodule
