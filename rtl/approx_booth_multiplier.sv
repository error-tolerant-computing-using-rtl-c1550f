// approx_booth_multiplier: approximate radix-4 Booth multiplier (ABM) for
// N-bit two's-complement operands, product 2N bits.
//
// Datapath: booth_pp_array (Booth encoder, partial-product generator and
// approximate regular array) followed by booth_pp_accumulator (approximate
// compressors in the low columns, exact reduction elsewhere, final adder).
// The four variants are selected by parameters:
//   ABM1: ENC = ENC_ABE1, APPROX_ARRAY = 1, APPROX_COMP = 0
//   ABM2: ENC = ENC_ABE2, APPROX_ARRAY = 1, APPROX_COMP = 0
//   ABM3: ENC = ENC_ABE1, APPROX_ARRAY = 1, APPROX_COMP = 1
//   ABM4: ENC = ENC_ABE2, APPROX_ARRAY = 1, APPROX_COMP = 1
// P is the approximation factor: the number of low-order product columns
// whose partial-product bits use the approximate encoder and, in ABM3/ABM4,
// the approximate compressor. With ENC = ENC_EXACT, APPROX_ARRAY = 0 and
// APPROX_COMP = 0 the unit is an exact Booth multiplier.
// Purely combinational: the product is valid one propagation delay after
// the operands. The variant table follows the published design; reading P
// as a column count and the exact configuration are this design's own.
module approx_booth_multiplier
  import abm_pkg::*;
#(
  parameter int unsigned N            = DEFAULT_N,
  parameter int unsigned P            = DEFAULT_P,
  parameter enc_e        ENC          = ENC_ABE1,
  parameter bit          APPROX_ARRAY = 1'b1,
  parameter bit          APPROX_COMP  = 1'b0
) (
  input  logic [N-1:0]   a,        // multiplicand, two's complement
  input  logic [N-1:0]   b,        // multiplier, two's complement
  output logic [2*N-1:0] product   // approximate a*b, two's complement
);
  logic [N/2:0][2*N-1:0] rows;

  booth_pp_array #(
    .N(N), .P(P), .ENC(ENC), .APPROX_ARRAY(APPROX_ARRAY)
  ) u_array (
    .a(a), .b(b), .rows(rows)
  );

  booth_pp_accumulator #(
    .N(N), .P(P), .APPROX_COMP(APPROX_COMP)
  ) u_acc (
    .rows(rows), .product(product)
  );
endmodule
