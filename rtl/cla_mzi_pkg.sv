// Shared constants of the optical reversible carry look-ahead adder.
//
// Optical cost is counted the way the design measures it: the number of
// MZI switches, with beam splitters and beam combiners counted as free.
// The per-gate costs below belong to the MZI arrangements used in ofg, opg
// and otg; those arrangements are this design's own, since only the gates'
// truth functions are fixed. The adder cost functions add up the gates that
// cla_design1 and cla_design2 instantiate for a given width.
package cla_mzi_pkg;

  // Default operand width of both adder designs (4-bit examples).
  localparam int unsigned CLA_WIDTH = 4;

  // MZI switches per reversible gate.
  localparam int unsigned OFG_COST = 2;
  localparam int unsigned OPG_COST = 4;
  localparam int unsigned OTG_COST = 3;

  // Design 1: per bit a mode Feynman gate on B, two Peres gates and the
  // carry Feynman gate; one more Feynman gate on the carry in.
  function automatic int unsigned design1_cost(int unsigned width);
    return width * (2 * OFG_COST + 2 * OPG_COST) + OFG_COST;
  endfunction

  // Design 2: design 1 plus a copying Feynman gate per generate signal.
  function automatic int unsigned design2_cost(int unsigned width);
    return design1_cost(width) + width * OFG_COST;
  endfunction

endpackage
