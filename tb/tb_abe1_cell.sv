// tb_abe1_cell: exhaustive test of approximate Booth encoder 1.
// Every input combination is compared with the +-A-only selection of the
// reference model, and the truth-table errors against the exact encoder
// are counted: ABE-1 must turn a 1 into a 0 in exactly 4 of 32 entries
// and never a 0 into a 1 (Q10 = 4, Q01 = 0).
module tb_abe1_cell;
  import abm_ref_pkg::*;
  logic b2ip1, b2i, b2im1, aj, ajm1, pp;
  int checks = 0, failures = 0;
  int q01 = 0, q10 = 0;
  bit ex;

  abe1_cell dut (.b2ip1, .b2i, .b2im1, .aj, .pp);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    // Truth-table error metrics: ED is the net number of flipped entries,
    // |Q01 - Q10| (0->1 and 1->0 flips cancel), MED = ED / 32 and
    // E_ABE = MED / Q with Q = Q01 + Q10.
    checks++;
    if (real'((q01 > q10) ? q01 - q10 : q10 - q01) / 32.0 != 0.125 ||
        0.125 / real'(q01 + q10) != 0.03125) begin
      failures++;
      $display("MED or E_ABE differs from the table");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {b2ip1, b2i, b2im1, aj, ajm1} = 5'(v);
      #1;
      checks++;
      if (pp !== ref_pp_bit(1, b2ip1, b2i, b2im1, aj, ajm1)) begin
        failures++;
        $display("mismatch input=%05b pp=%b", v[4:0], pp);
      end
      ex = ref_pp_bit(0, b2ip1, b2i, b2im1, aj, ajm1);
      if (ex && !pp) q10++;
      if (!ex && pp) q01++;
    end
    checks++;
    if (q10 != 4 || q01 != 0) begin
      failures++;
      $display("error counts Q10=%0d Q01=%0d, expected 4 and 0", q10, q01);
    end
    $display("ABE-1 Q01=%0d Q10=%0d", q01, q10);
    // Truth-table error metrics: ED is the net number of flipped entries,
    // |Q01 - Q10| (0->1 and 1->0 flips cancel), MED = ED / 32 and
    // E_ABE = MED / Q with Q = Q01 + Q10.
    checks++;
    if (real'((q01 > q10) ? q01 - q10 : q10 - q01) / 32.0 != 0.125 ||
        0.125 / real'(q01 + q10) != 0.03125) begin
      failures++;
      $display("MED or E_ABE differs from the table");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
