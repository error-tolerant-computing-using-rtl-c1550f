// tb_booth_pp_array: exhaustive 8x8 test of the Booth partial-product array.
//   - Exact encoder, full array: the rows must add up to a*b for all 65536
//     operand pairs (checks the encoder, the Neg bits and the sign-extension
//     constants).
//   - Exact encoder, approximate regular array: the sum must fall short of
//     a*b by 2^(N-2) exactly when the last group's Neg bit is 1, which must
//     happen for 3/8 of all multipliers.
//   - ABE-1 and ABE-2 with P = 8: every dot must match the reference dot
//     matrix.
module tb_booth_pp_array;
  import abm_pkg::*;
  import abm_ref_pkg::*;
  localparam int N = 8;
  localparam int W = 2 * N;
  localparam int P = 8;

  logic [N-1:0] a, b;
  logic [N/2:0][W-1:0] rows_ex, rows_apa, rows_abe1, rows_abe2;
  int checks = 0, failures = 0, dropped = 0;
  longint unsigned sum_ex, sum_apa, ex;
  dots_t m;

  booth_pp_array #(.N(N), .P(P), .ENC(ENC_EXACT), .APPROX_ARRAY(1'b0))
    u_ex (.a, .b, .rows(rows_ex));
  booth_pp_array #(.N(N), .P(P), .ENC(ENC_EXACT), .APPROX_ARRAY(1'b1))
    u_apa (.a, .b, .rows(rows_apa));
  booth_pp_array #(.N(N), .P(P), .ENC(ENC_ABE1), .APPROX_ARRAY(1'b1))
    u_abe1 (.a, .b, .rows(rows_abe1));
  booth_pp_array #(.N(N), .P(P), .ENC(ENC_ABE2), .APPROX_ARRAY(1'b1))
    u_abe2 (.a, .b, .rows(rows_abe2));

  function automatic bit dots_match(const ref dots_t mm,
                                    logic [N/2:0][W-1:0] r);
    for (int i = 0; i <= N/2; i++)
      for (int c = 0; c < W; c++)
        if (mm[i][c] != r[i][c]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      sum_ex = 0;
      sum_apa = 0;
      for (int i = 0; i <= N/2; i++) begin
        sum_ex  += longint'(rows_ex[i]);
        sum_apa += longint'(rows_apa[i]);
      end
      sum_ex  &= 64'hFFFF;
      sum_apa &= 64'hFFFF;
      ex = exact_product(N, a, b);
      checks++;
      if (sum_ex != ex) begin
        failures++;
        if (failures < 10) $display("exact array a=%h b=%h sum=%h exp=%h", a, b, sum_ex, ex);
      end
      checks++;
      if (ref_neg(b[7], b[6], b[5])) begin
        dropped++;
        if (sum_apa != ((ex - (64'd1 << (N-2))) & 64'hFFFF)) failures++;
      end else if (sum_apa != ex) failures++;
      ref_dots(N, P, 1, 1'b1, a, b, m);
      checks++;
      if (!dots_match(m, rows_abe1)) begin
        failures++;
        if (failures < 10) $display("ABE-1 dots a=%h b=%h", a, b);
      end
      ref_dots(N, P, 2, 1'b1, a, b, m);
      checks++;
      if (!dots_match(m, rows_abe2)) begin
        failures++;
        if (failures < 10) $display("ABE-2 dots a=%h b=%h", a, b);
      end
    end
    checks++;
    if (dropped != 65536 * 3 / 8) begin
      failures++;
      $display("dropped Neg count %0d", dropped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
