// booth_pp_accumulator: partial-product accumulation and final adder.
//
// Input is the Booth partial-product array as N/2+1 rows of 2N bits (see
// booth_pp_array). In every column c below the approximation factor P, and
// only when APPROX_COMP is set, the bits of the column are taken four at a
// time (rows 0-3, 4-7, ...; missing rows read as 0) and reduced by an
// approximate 4-2 compressor: its sum stays in column c, its carry moves to
// column c+1. All other bits are accumulated exactly. The surviving bits
// and the compressor outputs are then added by an exact carry-propagate
// final adder, modulo 2^(2N).
//
// For N = 8 no column of the regular array is taller than four, so one level
// of compressors is the whole reduction in the approximated columns. For
// wider operands only the first level is approximate and the rest of the
// reduction is exact. The compressor placement and this split are this
// design's choices; the published design names the compressor and the final
// adder but not their arrangement.
// Combinational.
module booth_pp_accumulator
  import abm_pkg::*;
#(
  parameter int unsigned N           = DEFAULT_N,
  parameter int unsigned P           = DEFAULT_P,
  parameter bit          APPROX_COMP = 1'b1
) (
  input  logic [N/2:0][2*N-1:0] rows,
  output logic [2*N-1:0]        product
);
  localparam int unsigned NR   = N / 2 + 1;
  localparam int unsigned W    = 2 * N;
  localparam int unsigned NGRP = (NR + 3) / 4;

  logic                     cs [NGRP][W];   // compressor sum, weight 2^c
  logic                     cc [NGRP][W];   // compressor carry, weight 2^(c+1)

  if (APPROX_COMP && P > 0) begin : g_cmp_stage
    // rows padded with zero rows to a multiple of four
    logic [4*NGRP-1:0][W-1:0] rows_pad;

    always_comb begin
      rows_pad = '0;
      for (int unsigned r = 0; r < NR; r++) rows_pad[r] = rows[r];
    end

    for (genvar g = 0; g < NGRP; g++) begin : g_grp
      for (genvar c = 0; c < W; c++) begin : g_col
        if (c < P) begin : g_cmp
          approx_compressor42 u_cmp (
            .p1(rows_pad[4*g][c]),   .p2(rows_pad[4*g+1][c]),
            .p3(rows_pad[4*g+2][c]), .p4(rows_pad[4*g+3][c]),
            .sum(cs[g][c]), .carry(cc[g][c])
          );
        end else begin : g_none
          assign cs[g][c] = 1'b0;
          assign cc[g][c] = 1'b0;
        end
      end
    end
  end else begin : g_no_cmp_stage
    for (genvar g = 0; g < NGRP; g++) begin : g_grp
      for (genvar c = 0; c < W; c++) begin : g_col
        assign cs[g][c] = 1'b0;
        assign cc[g][c] = 1'b0;
      end
    end
  end

  always_comb begin
    logic [W-1:0] tot;   // running sum of the final adder
    logic [W-1:0] acc;
    logic [W-1:0] sv;
    logic [W-1:0] cv;
    tot = '0;
    for (int unsigned r = 0; r < NR; r++) begin
      for (int unsigned c = 0; c < W; c++)
        acc[c] = (APPROX_COMP && c < P) ? 1'b0 : rows[r][c];
      tot = tot + acc;
    end
    for (int unsigned g = 0; g < NGRP; g++) begin
      sv = '0;
      cv = '0;
      for (int unsigned c = 0; c < W; c++) begin
        sv[c] = cs[g][c];
        if (c + 1 < W) cv[c+1] = cc[g][c];
      end
      tot = tot + sv + cv;
    end
    product = tot;
  end
endmodule
