// booth_pp_array: radix-4 Booth encoder, partial-product generator and
// (approximate) regular partial-product array of an N x N two's-complement
// multiplier.
//
// The multiplier b is cut into N/2 overlapping groups (b_{2i+1}, b_{2i},
// b_{2i-1}) with b_{-1} = 0. Group i selects 0, +-A or +-2A; its row holds
// N+1 partial-product bits pp_i0..pp_iN at columns 2i..2i+N, with the
// multiplicand sign-extended by one bit (a_N = a_{N-1}) and a_{-1} = 0.
// A negative multiple is produced in one's complement and completed by a
// Neg bit, neg_i = b_{2i+1} & ~(b_{2i} & b_{2i-1}), placed at column 2i of
// the next row. Sign extension uses constant-folded bits: row 0 carries
// s0, s0, ~s0 at columns N+1..N+3, and every later row carries ~s_i at
// column 2i+N+1 and a constant 1 at column 2i+N+2 (dropped when it falls at
// column 2N), where s_i = pp_iN.
//
// Approximation:
//   - Every pp bit whose column 2i+j lies below the approximation factor P
//     comes from the approximate encoder selected by ENC (ABE-1 or ABE-2);
//     all other bits, and every Neg bit, come from the exact encoder.
//   - With APPROX_ARRAY set the Neg bit of the last group, which alone would
//     need the extra row N/2, is discarded, so the array keeps N/2 rows. This
//     is the approximate regular partial-product array.
//
// Output rows[r] is a 2N-bit vector whose bit c is the dot of row r in
// column c (zero where the row has no dot); rows[N/2] holds only the last
// Neg bit, or nothing when APPROX_ARRAY is set. Combinational.
//
// The encoder equations, the dot layout of the array and the removal of the
// last Neg bit follow the published design. The Neg-bit logic, the values of
// the sign-extension bits and the rule that Neg bits are never approximated
// are standard radix-4 Booth practice chosen here. When column 0 is
// approximated, the constant a_{-1} = 0 is read by no cell and lint reports
// that bit of a_ext as unused; it is kept so the indexing stays uniform.
module booth_pp_array
  import abm_pkg::*;
#(
  parameter int unsigned N            = DEFAULT_N,
  parameter int unsigned P            = DEFAULT_P,
  parameter enc_e        ENC          = ENC_ABE1,
  parameter bit          APPROX_ARRAY = 1'b1
) (
  input  logic [N-1:0]                 a,     // multiplicand
  input  logic [N-1:0]                 b,     // multiplier
  output logic [N/2:0][2*N-1:0]        rows
);
  localparam int unsigned NG = N / 2;
  localparam int unsigned W  = 2 * N;

  // a_ext[j+1] = a_j for j = -1..N ; b_ext[k+1] = b_k for k = -1..N-1
  logic [N+1:0] a_ext;
  logic [N:0]   b_ext;
  logic [N:0]   pp  [NG];
  logic [NG-1:0] neg;

  assign a_ext = {a[N-1], a, 1'b0};
  assign b_ext = {b, 1'b0};

  for (genvar i = 0; i < NG; i++) begin : g_grp
    for (genvar j = 0; j <= N; j++) begin : g_bit
      if (ENC == ENC_ABE1 && (2*i + j) < P) begin : g_abe1
        abe1_cell u_cell (
          .b2ip1(b_ext[2*i+2]), .b2i(b_ext[2*i+1]), .b2im1(b_ext[2*i]),
          .aj(a_ext[j+1]), .pp(pp[i][j])
        );
      end else if (ENC == ENC_ABE2 && (2*i + j) < P) begin : g_abe2
        abe2_cell u_cell (
          .b2ip1(b_ext[2*i+2]), .aj(a_ext[j+1]), .pp(pp[i][j])
        );
      end else begin : g_exact
        booth_pp_exact u_cell (
          .b2ip1(b_ext[2*i+2]), .b2i(b_ext[2*i+1]), .b2im1(b_ext[2*i]),
          .aj(a_ext[j+1]), .ajm1(a_ext[j]), .pp(pp[i][j])
        );
      end
    end
    assign neg[i] = b_ext[2*i+2] & ~(b_ext[2*i+1] & b_ext[2*i]);
  end

  always_comb begin
    rows = '0;
    for (int unsigned i = 0; i < NG; i++) begin
      for (int unsigned j = 0; j <= N; j++) rows[i][2*i+j] = pp[i][j];
      if (i == 0) begin
        rows[0][N+1] = pp[0][N];
        rows[0][N+2] = pp[0][N];
        rows[0][N+3] = ~pp[0][N];
      end else begin
        rows[i][2*i+N+1] = ~pp[i][N];
        if (2*i + N + 2 < W) rows[i][2*i+N+2] = 1'b1;
      end
      // Neg bit of group i sits in the next row at column 2i
      if (i + 1 < NG || !APPROX_ARRAY) rows[i+1][2*i] = neg[i];
    end
  end
endmodule
