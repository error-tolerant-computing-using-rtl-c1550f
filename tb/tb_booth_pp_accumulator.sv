// tb_booth_pp_accumulator: random partial-product matrices through the
// accumulator, N = 8, with the approximate compressors in columns below
// P = 8 and without them. The exact instance must return the plain column
// sum; the approximate one must match the compressor error model. Both
// matrices with all-zero and with dense dots are included, and the test
// counts how often a compressor actually lost value.
module tb_booth_pp_accumulator;
  import abm_ref_pkg::*;
  localparam int N = 8;
  localparam int W = 2 * N;
  localparam int P = 8;

  logic [N/2:0][W-1:0] rows;
  logic [W-1:0] prod_ex, prod_ap;
  int checks = 0, failures = 0, lossy = 0;
  longint unsigned e_ex, e_ap;
  dots_t m;

  booth_pp_accumulator #(.N(N), .P(P), .APPROX_COMP(1'b0))
    u_ex (.rows, .product(prod_ex));
  booth_pp_accumulator #(.N(N), .P(P), .APPROX_COMP(1'b1))
    u_ap (.rows, .product(prod_ap));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i <= N/2; i++) begin
        case (t % 4)
          0: rows[i] = W'($urandom);
          1: rows[i] = W'($urandom | $urandom);
          2: rows[i] = '1;
          default: rows[i] = W'($urandom & $urandom);
        endcase
      end
      if (t == 0) rows = '0;
      for (int i = 0; i <= N/2; i++)
        for (int c = 0; c < W; c++) m[i][c] = rows[i][c];
      #1;
      e_ex = ref_accumulate(N, P, 1'b0, m);
      e_ap = ref_accumulate(N, P, 1'b1, m);
      if (e_ex != e_ap) lossy++;
      checks += 2;
      if (prod_ex != W'(e_ex)) begin
        failures++;
        if (failures < 10) $display("exact t=%0d got %h exp %h", t, prod_ex, e_ex);
      end
      if (prod_ap != W'(e_ap)) begin
        failures++;
        if (failures < 10) $display("approx t=%0d got %h exp %h", t, prod_ap, e_ap);
      end
    end
    checks++;
    if (lossy == 0) failures++;
    $display("compressor errors seen in %0d matrices", lossy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
