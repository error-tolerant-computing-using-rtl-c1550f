// abm_pkg: types and constants shared by the approximate radix-4 Booth
// multiplier (ABM) family.
//
// enc_e selects the cell that generates a partial-product bit in the
// approximated (low-order) columns of the Booth partial-product array:
//   ENC_EXACT - the exact radix-4 Booth encoder/selector,
//   ENC_ABE1  - approximate Booth encoder 1, which drops the +-2A term,
//   ENC_ABE2  - approximate Booth encoder 2, a single XOR of a_j and b_{2i+1}.
// The four multiplier variants ABM1..ABM4 are combinations of an approximate
// encoder with the approximate regular partial-product array and, for ABM3
// and ABM4, the approximate 4-2 compressor.
package abm_pkg;

  typedef enum logic [1:0] {
    ENC_EXACT = 2'd0,
    ENC_ABE1  = 2'd1,
    ENC_ABE2  = 2'd2
  } enc_e;

  // Default operand width: the evaluated designs are 8-bit multipliers.
  localparam int unsigned DEFAULT_N = 8;
  // Default approximation factor (number of low-order product columns whose
  // partial-product bits come from an approximate encoder). The evaluation
  // sweeps it from 4 to 14; 8 is the midpoint chosen here.
  localparam int unsigned DEFAULT_P = 8;

endpackage
