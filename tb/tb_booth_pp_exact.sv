// tb_booth_pp_exact: exhaustive test of the exact Booth partial-product bit.
// All 32 combinations of (b_{2i+1}, b_{2i}, b_{2i-1}, a_j, a_{j-1}) are
// applied and the output is compared with bit j of the selected multiple
// d*A (one's complement for negative d) from the reference model.
module tb_booth_pp_exact;
  import abm_ref_pkg::*;
  logic b2ip1, b2i, b2im1, aj, ajm1, pp;
  int checks = 0, failures = 0;

  booth_pp_exact dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {b2ip1, b2i, b2im1, aj, ajm1} = 5'(v);
      #1;
      checks++;
      if (pp !== ref_pp_bit(0, b2ip1, b2i, b2im1, aj, ajm1)) begin
        failures++;
        $display("mismatch input=%05b pp=%b", v[4:0], pp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
