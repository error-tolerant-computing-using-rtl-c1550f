// abe2_cell: approximate Booth encoder 2 (ABE-2), one partial-product bit.
//
// ABE-2 reduces the selector to a single XOR:
//   app_ij = a_j ^ b_{2i+1}
// Against the exact cell it turns a 0 into a 1 in 6 and a 1 into a 0 in 2 of
// the 32 truth-table entries (groups 000 and 111 and the +-2A cases where
// a_j differs from a_{j-1}). Combinational.
// The equation is the published one; the cell has no choices of its own.
module abe2_cell (
  input  logic b2ip1,  // b_{2i+1}
  input  logic aj,     // a_j
  output logic pp      // approximate pp_ij
);
  always_comb pp = aj ^ b2ip1;
endmodule
