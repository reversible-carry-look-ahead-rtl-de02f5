// Reversible carry look-ahead adder/subtractor, design 2.
//
// Same function and ports as cla_design1, and the same three gate steps per
// bit: OPG(Ai, Bi', 0) for Pi and Gi, OPG(Pi, Ci, 0) for Si and Pi & Ci, and
// OFG(Gi, Pi&Ci) for Ci+1 = Gi xor Pi&Ci. The change is an extra Feynman
// gate with its second input tied to 0, used as a copying gate: it turns
// the generate signal into two identical copies, one for the g output and
// one for the carry gate, so no signal is reused by plain fan-out. The
// design names the copying gate for G0; here every Gi is copied, since every
// generate signal is used twice. This costs one more gate per bit and one
// more gate level on the generate path.
//
// Subtraction (sub = 1) works as in design 1: Feynman gates controlled by
// sub invert B and the carry in. Width 4 by default. Purely combinational.
module cla_design2
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
  localparam int unsigned OPTICAL_COST = design2_cost(WIDTH);

  logic [WIDTH:0]   c;
  logic [WIDTH-1:0] b_eff;
  logic [WIDTH-1:0] g_raw;      // generate straight from the Peres gate
  logic [WIDTH-1:0] g_carry;    // copy of the generate for the carry gate
  logic [WIDTH-1:0] pc;
  logic [WIDTH-1:0] sub_copy_unused, a_copy_unused, p_copy_unused, g_copy_unused;
  logic             sub_c_unused;

  ofg u_mode_cin (.a(sub), .b(cin), .p(sub_c_unused), .q(c[0]));

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ofg u_mode_b (.a(sub), .b(b[i]), .p(sub_copy_unused[i]), .q(b_eff[i]));

    // Step 1: propagate and generate
    opg u_pg  (.a(a[i]), .b(b_eff[i]), .c(1'b0),
               .p(a_copy_unused[i]), .q(p[i]), .r(g_raw[i]));
    // Copying gate: Gi onto two lines
    ofg u_copy (.a(g_raw[i]), .b(1'b0), .p(g[i]), .q(g_carry[i]));
    // Step 2: sum and Pi & Ci
    opg u_sum (.a(p[i]), .b(c[i]), .c(1'b0),
               .p(p_copy_unused[i]), .q(sum[i]), .r(pc[i]));
    // Step 3: carry out, Eq. 7
    ofg u_cry (.a(g_carry[i]), .b(pc[i]), .p(g_copy_unused[i]), .q(c[i+1]));
  end

  assign cout = c[WIDTH];

endmodule
