// tb_approx_compressor42: exhaustive test of the approximate 4-2 compressor.
// For all 16 inputs the value sum + 2*carry is compared with the reference
// error pattern, and the number of inexact patterns (7) is checked.
module tb_approx_compressor42;
  import abm_ref_pkg::*;
  logic p1, p2, p3, p4, sum, carry;
  int checks = 0, failures = 0, inexact = 0;
  int val, cnt;

  approx_compressor42 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {p1, p2, p3, p4} = 4'(v);
      #1;
      val = int'(sum) + 2 * int'(carry);
      cnt = int'(p1) + int'(p2) + int'(p3) + int'(p4);
      checks++;
      if (val != ref_cmp42(p1, p2, p3, p4)) begin
        failures++;
        $display("mismatch input=%04b sum=%b carry=%b", v[3:0], sum, carry);
      end
      if (val != cnt) inexact++;
    end
    checks++;
    if (inexact != 7) begin
      failures++;
      $display("inexact patterns %0d, expected 7", inexact);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
