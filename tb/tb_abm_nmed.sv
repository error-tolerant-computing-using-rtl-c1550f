// tb_abm_nmed: error-metric workload for the 8-bit approximate Booth
// multipliers ABM1..ABM4 at approximation factors P = 4, 6, ..., 14.
//
// All 65536 signed operand pairs are applied to 24 multipliers (four
// variants times six values of P). For each, the error distance
// ED = |exact - approximate| is accumulated, and the mean error distance
// MED and the normalised NMED = MED / 2^(2N-2) are printed (2^14 is the
// largest product magnitude, (-128)*(-128)). Every output is also compared
// with the reference model. The metrics are checked for the behaviour an
// approximation factor must have: NMED rises with P for every variant, and
// adding the approximate compressor (ABM3 over ABM1, ABM4 over ABM2) never
// lowers it at the same P.
module tb_abm_nmed;
  import abm_pkg::*;
  import abm_ref_pkg::*;
  localparam int N  = 8;
  localparam int W  = 2 * N;
  localparam int NP = 6;

  logic [N-1:0] a, b;
  logic [W-1:0] prod [4][NP];
  longint unsigned ed_sum [4][NP];
  int checks = 0, failures = 0;

  // Published simulated NMED, units of 10^-2, P = 4, 6, 8, 10, 12, 14.
  real ref_nmed [4][NP] = '{
    '{0.082, 0.137, 0.427, 1.269, 3.369,  7.022},
    '{0.076, 0.104, 0.409, 1.4,   4.089, 10.138},
    '{0.082, 0.137, 0.607, 2.447, 9.827, 20.871},
    '{0.076, 0.162, 0.598, 2.377, 9.778, 17.24}};

  for (genvar k = 0; k < NP; k++) begin : g_p
    localparam int unsigned PV = 4 + 2 * k;
    approx_booth_multiplier #(.N(N), .P(PV), .ENC(ENC_ABE1), .APPROX_COMP(1'b0))
      u_abm1 (.a, .b, .product(prod[0][k]));
    approx_booth_multiplier #(.N(N), .P(PV), .ENC(ENC_ABE2), .APPROX_COMP(1'b0))
      u_abm2 (.a, .b, .product(prod[1][k]));
    approx_booth_multiplier #(.N(N), .P(PV), .ENC(ENC_ABE1), .APPROX_COMP(1'b1))
      u_abm3 (.a, .b, .product(prod[2][k]));
    approx_booth_multiplier #(.N(N), .P(PV), .ENC(ENC_ABE2), .APPROX_COMP(1'b1))
      u_abm4 (.a, .b, .product(prod[3][k]));
  end

  function automatic longint sext(longint unsigned v);
    return (v[W-1]) ? longint'(v) - (longint'(1) << W) : longint'(v);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ex, ap, d;
    real nmed [4][NP];
    for (int m = 0; m < 4; m++)
      for (int k = 0; k < NP; k++) ed_sum[m][k] = 0;
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      ex = sext(exact_product(N, a, b));
      for (int m = 0; m < 4; m++)
        for (int k = 0; k < NP; k++) begin
          ap = sext(longint'(prod[m][k]));
          d = ex - ap;
          ed_sum[m][k] += (d < 0) ? -d : d;
          if ((v % 61) == 0) begin
            checks++;
            if (prod[m][k] != W'(ref_product(N, 4 + 2*k, (m % 2) + 1, 1'b1,
                                              m >= 2, a, b))) failures++;
          end
        end
    end
    $display("NMED x 10^-2, exhaustive 8-bit inputs");
    $display("        P=4      P=6      P=8      P=10     P=12     P=14");
    for (int m = 0; m < 4; m++) begin
      for (int k = 0; k < NP; k++)
        nmed[m][k] = real'(ed_sum[m][k]) / 65536.0 / real'(1 << (2*N-1));
      $display("ABM%0d  %8.5f %8.5f %8.5f %8.5f %8.5f %8.5f", m + 1,
               100.0*nmed[m][0], 100.0*nmed[m][1], 100.0*nmed[m][2],
               100.0*nmed[m][3], 100.0*nmed[m][4], 100.0*nmed[m][5]);
      $display("  ref %8.5f %8.5f %8.5f %8.5f %8.5f %8.5f",
               ref_nmed[m][0], ref_nmed[m][1], ref_nmed[m][2],
               ref_nmed[m][3], ref_nmed[m][4], ref_nmed[m][5]);
      for (int k = 0; k < NP; k++) begin
        checks++;
        if (100.0*nmed[m][k] > 2.0*ref_nmed[m][k] ||
            100.0*nmed[m][k] < 0.5*ref_nmed[m][k]) begin
          failures++;
          $display("ABM%0d P=%0d NMED off the published value", m + 1, 4 + 2*k);
        end
      end
      for (int k = 1; k < NP; k++) begin
        checks++;
        if (nmed[m][k] < nmed[m][k-1]) begin
          failures++;
          $display("ABM%0d NMED falls from P=%0d to P=%0d", m + 1, 2 + 2*k, 4 + 2*k);
        end
      end
    end
    for (int k = 0; k < NP; k++)
      for (int m = 0; m < 2; m++) begin
        checks++;
        if (nmed[m+2][k] < nmed[m][k]) begin
          failures++;
          $display("ABM%0d below ABM%0d at P=%0d", m + 3, m + 1, 4 + 2*k);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
