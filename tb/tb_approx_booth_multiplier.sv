// tb_approx_booth_multiplier: exhaustive 8x8 test of the approximate Booth
// multiplier in its default configuration (ABM1, P = 8) and in the other
// three variants and the exact configuration, all at N = 8, P = 8.
// Each product is compared with the reference model for all 65536 operand
// pairs; the exact configuration must equal a*b everywhere.
module tb_approx_booth_multiplier;
  import abm_pkg::*;
  import abm_ref_pkg::*;
  localparam int N = 8;
  localparam int W = 2 * N;
  localparam int P = 8;

  logic [N-1:0] a, b;
  logic [W-1:0] p_def, p_abm2, p_abm3, p_abm4, p_exact;
  int checks = 0, failures = 0;

  approx_booth_multiplier u_def (.a, .b, .product(p_def));
  approx_booth_multiplier #(.N(N), .P(P), .ENC(ENC_ABE2), .APPROX_ARRAY(1'b1),
                            .APPROX_COMP(1'b0)) u_abm2 (.a, .b, .product(p_abm2));
  approx_booth_multiplier #(.N(N), .P(P), .ENC(ENC_ABE1), .APPROX_ARRAY(1'b1),
                            .APPROX_COMP(1'b1)) u_abm3 (.a, .b, .product(p_abm3));
  approx_booth_multiplier #(.N(N), .P(P), .ENC(ENC_ABE2), .APPROX_ARRAY(1'b1),
                            .APPROX_COMP(1'b1)) u_abm4 (.a, .b, .product(p_abm4));
  approx_booth_multiplier #(.N(N), .P(P), .ENC(ENC_EXACT), .APPROX_ARRAY(1'b0),
                            .APPROX_COMP(1'b0)) u_exact (.a, .b, .product(p_exact));

  task automatic check(string name, logic [W-1:0] got, longint unsigned exp);
    checks++;
    if (got != W'(exp)) begin
      failures++;
      if (failures < 10) $display("%s a=%h b=%h got %h exp %h", name, a, b, got, exp);
    end
  endtask

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
      check("ABM1",  p_def,   ref_product(N, P, 1, 1'b1, 1'b0, a, b));
      check("ABM2",  p_abm2,  ref_product(N, P, 2, 1'b1, 1'b0, a, b));
      check("ABM3",  p_abm3,  ref_product(N, P, 1, 1'b1, 1'b1, a, b));
      check("ABM4",  p_abm4,  ref_product(N, P, 2, 1'b1, 1'b1, a, b));
      check("exact", p_exact, exact_product(N, a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
