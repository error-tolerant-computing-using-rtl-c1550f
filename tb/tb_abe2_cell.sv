// tb_abe2_cell: exhaustive test of approximate Booth encoder 2.
// Every input combination is compared with the reference model, and the
// truth-table errors against the exact encoder are counted: ABE-2 must turn
// a 0 into a 1 in 6 and a 1 into a 0 in 2 of 32 entries (Q01 = 6, Q10 = 2).
module tb_abe2_cell;
  import abm_ref_pkg::*;
  logic b2ip1, b2i, b2im1, aj, ajm1, pp;
  int checks = 0, failures = 0;
  int q01 = 0, q10 = 0;
  bit ex;

  abe2_cell dut (.b2ip1, .aj, .pp);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    // Truth-table error metrics: ED is the net number of flipped entries,
    // |Q01 - Q10| (0->1 and 1->0 flips cancel), MED = ED / 32 and
    // E_ABE = MED / Q with Q = Q01 + Q10.
    checks++;
    if (real'((q01 > q10) ? q01 - q10 : q10 - q01) / 32.0 != 0.125 ||
        0.125 / real'(q01 + q10) != 0.015625) begin
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
      if (pp !== ref_pp_bit(2, b2ip1, b2i, b2im1, aj, ajm1)) begin
        failures++;
        $display("mismatch input=%05b pp=%b", v[4:0], pp);
      end
      ex = ref_pp_bit(0, b2ip1, b2i, b2im1, aj, ajm1);
      if (ex && !pp) q10++;
      if (!ex && pp) q01++;
    end
    checks++;
    if (q01 != 6 || q10 != 2) begin
      failures++;
      $display("error counts Q01=%0d Q10=%0d, expected 6 and 2", q01, q10);
    end
    $display("ABE-2 Q01=%0d Q10=%0d", q01, q10);
    // Truth-table error metrics: ED is the net number of flipped entries,
    // |Q01 - Q10| (0->1 and 1->0 flips cancel), MED = ED / 32 and
    // E_ABE = MED / Q with Q = Q01 + Q10.
    checks++;
    if (real'((q01 > q10) ? q01 - q10 : q10 - q01) / 32.0 != 0.125 ||
        0.125 / real'(q01 + q10) != 0.015625) begin
      failures++;
      $display("MED or E_ABE differs from the table");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
