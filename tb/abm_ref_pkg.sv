// abm_ref_pkg: reference model used by the testbenches of the approximate
// Booth multiplier family.
//
// The model is written from the arithmetic, not from the RTL: a Booth digit
// d = -2*b_{2i+1} + b_{2i} + b_{2i-1} selects bit j of d*A before the
// negation increment (exact), of the +-A multiple only (ABE-1) or of the
// sign-flipped multiplicand (ABE-2). Dot positions follow the regular 8x8
// Booth array: row i holds pp_i0..pp_iN at columns 2i..2i+N, the negation
// bit of group i sits in row i+1 at column 2i, row 0 carries s0 s0 ~s0 above
// its top bit and later rows ~s_i and a constant 1. The approximate 4-2
// compressor is modelled by its error pattern: exact count, except 3 for a
// column group whose two pairs each hold a single 1, 0 when both 1s share a
// pair and 2 for 1111.
package abm_ref_pkg;

  localparam int MAXN = 16;

  function automatic int booth_digit(bit b2ip1, bit b2i, bit b2im1);
    return -2 * int'(b2ip1) + int'(b2i) + int'(b2im1);
  endfunction

  // enc: 0 exact, 1 ABE-1, 2 ABE-2
  function automatic bit ref_pp_bit(int enc, bit b2ip1, bit b2i, bit b2im1,
                                    bit aj, bit ajm1);
    int d;
    d = booth_digit(b2ip1, b2i, b2im1);
    case (enc)
      1: return (d == 1) ? aj : (d == -1) ? !aj : 1'b0;
      2: return b2ip1 ? !aj : aj;
      default:
        case (d)
          1:  return aj;
          2:  return ajm1;
          -1: return !aj;
          -2: return !ajm1;
          default: return 1'b0;
        endcase
    endcase
  endfunction

  // Group i negation bit: the digit is negative.
  function automatic bit ref_neg(bit b2ip1, bit b2i, bit b2im1);
    return booth_digit(b2ip1, b2i, b2im1) < 0;
  endfunction

  typedef bit dots_t [MAXN/2+1][2*MAXN];

  function automatic void ref_dots(int n, int p, int enc, bit approx_array,
                                   longint unsigned a, longint unsigned b,
                                   output dots_t m);
    bit ab [MAXN+2];   // ab[j+1] = a_j, j = -1..N
    bit bb [MAXN+1];   // bb[k+1] = b_k, k = -1..N-1
    bit s;
    for (int r = 0; r <= MAXN/2; r++)
      for (int c = 0; c < 2*MAXN; c++) m[r][c] = 0;
    ab[0] = 0;
    for (int j = 0; j < n; j++) ab[j+1] = a[j];
    ab[n+1] = a[n-1];
    bb[0] = 0;
    for (int k = 0; k < n; k++) bb[k+1] = b[k];
    for (int i = 0; i < n/2; i++) begin
      for (int j = 0; j <= n; j++)
        m[i][2*i+j] = ref_pp_bit((2*i+j < p) ? enc : 0, bb[2*i+2], bb[2*i+1],
                                 bb[2*i], ab[j+1], ab[j]);
      s = m[i][2*i+n];
      if (i == 0) begin
        m[0][n+1] = s; m[0][n+2] = s; m[0][n+3] = !s;
      end else begin
        m[i][2*i+n+1] = !s;
        if (2*i+n+2 < 2*n) m[i][2*i+n+2] = 1;
      end
      if (i + 1 < n/2 || !approx_array)
        m[i+1][2*i] = ref_neg(bb[2*i+2], bb[2*i+1], bb[2*i]);
    end
  endfunction

  // Value of one column group of up to four dots after the approximate
  // 4-2 compressor, by its error pattern.
  function automatic int ref_cmp42(bit p1, bit p2, bit p3, bit p4);
    int cnt;
    cnt = int'(p1) + int'(p2) + int'(p3) + int'(p4);
    if (cnt == 4) return 2;
    if (cnt == 2 && (p1 != p2) && (p3 != p4)) return 3;
    if (cnt == 2) return 0;
    return cnt;
  endfunction

  // Sum of a dot matrix, columns below p compressed four rows at a time
  // when comp is set; result modulo 2^(2n).
  function automatic longint unsigned ref_accumulate(int n, int p, bit comp,
                                                     const ref dots_t m);
    longint unsigned acc;
    bit q [4];
    acc = 0;
    for (int c = 0; c < 2*n; c++) begin
      if (comp && c < p) begin
        for (int g = 0; g <= n/2; g += 4) begin
          for (int k = 0; k < 4; k++) q[k] = (g + k <= n/2) ? m[g+k][c] : 1'b0;
          acc += longint'(ref_cmp42(q[0], q[1], q[2], q[3])) << c;
        end
      end else begin
        for (int r = 0; r <= n/2; r++) acc += longint'(m[r][c]) << c;
      end
    end
    return acc & ((64'd1 << (2*n)) - 1);
  endfunction

  function automatic longint unsigned ref_product(int n, int p, int enc,
                                                  bit approx_array, bit comp,
                                                  longint unsigned a,
                                                  longint unsigned b);
    dots_t m;
    ref_dots(n, p, enc, approx_array, a, b, m);
    return ref_accumulate(n, p, comp, m);
  endfunction

  // Exact two's-complement product of two n-bit operands, modulo 2^(2n).
  function automatic longint unsigned exact_product(int n, longint unsigned a,
                                                    longint unsigned b);
    longint sa, sb;
    sa = longint'(a);
    sb = longint'(b);
    if (a[n-1]) sa = sa - (longint'(1) << n);
    if (b[n-1]) sb = sb - (longint'(1) << n);
    return longint'(sa * sb) & ((64'd1 << (2*n)) - 1);
  endfunction

endpackage
