// approx_compressor42: approximate 4-2 compressor without carry-in or
// carry-out.
//
// Four bits of one column, P1..P4, are reduced to a sum bit of the same
// weight and a carry bit of twice that weight, working on the input pairs
// (P1,P2) and (P3,P4):
//   sum   = (P1 ^ P2) | (P3 ^ P4)      = ~(P1 xnor P2) | ~(P3 xnor P4)
//   carry = (P1 | P2) & (P3 | P4)      = ~( ~(P1|P2) | ~(P3|P4) )
// sum + 2*carry equals P1+P2+P3+P4 in 9 of the 16 input patterns. It is one
// too high when each pair holds a single 1 (4 patterns), and two too low
// when the two 1s share a pair (1100, 0011) or all four inputs are 1, so
// the errors partly cancel over many columns.
// Combinational, no clock.
module approx_compressor42 (
  input  logic p1,
  input  logic p2,
  input  logic p3,
  input  logic p4,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = (p1 ^ p2) | (p3 ^ p4);
    carry = (p1 | p2) & (p3 | p4);
  end
endmodule
