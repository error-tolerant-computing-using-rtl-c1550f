// tb_abm16_nmed: 16-bit approximate Booth multipliers ABM1..ABM4 at
// approximation factor P = 16, plus the exact configuration.
//
// 16-bit operands cannot be swept exhaustively, so 200000 random signed
// pairs (and a set of corner values) are applied. Every product is compared
// with the reference model; the exact configuration must equal a*b. The
// estimated NMED (MED / 2^31, units of 10^-2) of each variant is printed.
// At N = 16 the regular array has columns of up to eight dots, so the
// approximate compressors work in two groups of four per column.
module tb_abm16_nmed;
  import abm_pkg::*;
  import abm_ref_pkg::*;
  localparam int N = 16;
  localparam int W = 2 * N;
  localparam int P = 16;
  localparam int SAMPLES = 200000;

  logic [N-1:0] a, b;
  logic [W-1:0] prod [5];
  longint unsigned ed_sum [4];
  int checks = 0, failures = 0, cmp_err = 0;

  approx_booth_multiplier #(.N(N), .P(P), .ENC(ENC_ABE1), .APPROX_COMP(1'b0))
    u_abm1 (.a, .b, .product(prod[0]));
  approx_booth_multiplier #(.N(N), .P(P), .ENC(ENC_ABE2), .APPROX_COMP(1'b0))
    u_abm2 (.a, .b, .product(prod[1]));
  approx_booth_multiplier #(.N(N), .P(P), .ENC(ENC_ABE1), .APPROX_COMP(1'b1))
    u_abm3 (.a, .b, .product(prod[2]));
  approx_booth_multiplier #(.N(N), .P(P), .ENC(ENC_ABE2), .APPROX_COMP(1'b1))
    u_abm4 (.a, .b, .product(prod[3]));
  approx_booth_multiplier #(.N(N), .P(P), .ENC(ENC_EXACT), .APPROX_ARRAY(1'b0),
                            .APPROX_COMP(1'b0))
    u_exact (.a, .b, .product(prod[4]));

  function automatic longint sext(longint unsigned v);
    return (v[W-1]) ? longint'(v) - (longint'(1) << W) : longint'(v);
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ex, d;
    longint unsigned e;
    logic [N-1:0] corners [5] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF};
    for (int m = 0; m < 4; m++) ed_sum[m] = 0;
    for (int t = 0; t < SAMPLES; t++) begin
      if (t < 25) begin
        a = corners[t / 5];
        b = corners[t % 5];
      end else begin
        a = N'($urandom);
        b = N'($urandom);
      end
      #1;
      ex = sext(exact_product(N, a, b));
      checks++;
      if (prod[4] != W'(exact_product(N, a, b))) begin
        failures++;
        if (failures < 10) $display("exact a=%h b=%h got %h", a, b, prod[4]);
      end
      for (int m = 0; m < 4; m++) begin
        e = ref_product(N, P, (m % 2) + 1, 1'b1, m >= 2, a, b);
        checks++;
        if (prod[m] != W'(e)) begin
          failures++;
          if (failures < 10) $display("ABM%0d a=%h b=%h got %h exp %h", m + 1, a, b, prod[m], e);
        end
        d = ex - sext(longint'(prod[m]));
        ed_sum[m] += (d < 0) ? -d : d;
      end
      if (prod[2] != W'(ref_product(N, P, 1, 1'b1, 1'b0, a, b))) cmp_err++;
    end
    checks++;
    if (cmp_err == 0) begin failures++; $display("compressors never changed a result"); end
    for (int m = 0; m < 4; m++)
      $display("ABM%0d N=16 P=16 NMED x 10^-2 = %9.6f", m + 1,
               100.0 * real'(ed_sum[m]) / real'(SAMPLES) / (2.0 ** (W - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
