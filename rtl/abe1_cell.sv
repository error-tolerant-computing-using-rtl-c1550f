// abe1_cell: approximate Booth encoder 1 (ABE-1), one partial-product bit.
//
// ABE-1 keeps only the +-A term of the exact radix-4 Booth selector:
//   app_ij = (b_{2i} ^ b_{2i-1}) & (b_{2i+1} ^ a_j)
// so the +-2A multiples read as zero. Against the exact cell it turns a 1
// into a 0 in 4 of the 32 truth-table entries and never a 0 into a 1.
// Two XORs and an AND; combinational.
// The equation is the published one; the cell has no choices of its own.
module abe1_cell (
  input  logic b2ip1,  // b_{2i+1}
  input  logic b2i,    // b_{2i}
  input  logic b2im1,  // b_{2i-1}
  input  logic aj,     // a_j
  output logic pp      // approximate pp_ij
);
  always_comb pp = (b2i ^ b2im1) & (b2ip1 ^ aj);
endmodule
