// booth_pp_exact: exact radix-4 Booth partial-product bit.
//
// For Booth group i (multiplier bits b_{2i+1}, b_{2i}, b_{2i-1}) and
// multiplicand bits a_j, a_{j-1}, this cell produces bit j of the selected
// multiple (0, +-A, +-2A) before the +1 of the negation:
//   pp_ij = (b_{2i} ^ b_{2i-1}) & (b_{2i+1} ^ a_j)
//         | ~(b_{2i} ^ b_{2i-1}) & (b_{2i+1} ^ b_{2i}) & (b_{2i+1} ^ a_{j-1})
// The first term selects +-A, the second +-2A; a negative multiple comes out
// in one's complement and is completed by the row's Neg bit elsewhere.
// Purely combinational, no clock.
// The equation is the published one; the cell has no choices of its own.
module booth_pp_exact (
  input  logic b2ip1,  // b_{2i+1}
  input  logic b2i,    // b_{2i}
  input  logic b2im1,  // b_{2i-1}
  input  logic aj,     // a_j
  input  logic ajm1,   // a_{j-1}
  output logic pp      // pp_ij
);
  logic one_a;   // group selects +-A
  logic two_a;   // group selects +-2A

  always_comb begin
    one_a = b2i ^ b2im1;
    two_a = ~one_a & (b2ip1 ^ b2i);
    pp    = (one_a & (b2ip1 ^ aj)) | (two_a & (b2ip1 ^ ajm1));
  end
endmodule
