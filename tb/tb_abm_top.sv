// tb_abm_top: end-to-end test of abm_top at its default parameters
// (N = 8, P = 8).
//
// Operands are offered with a random in_valid strobe: directed corner values
// first (0, 1, -1, the most negative value, all Booth digit patterns), then
// random pairs. One clock after every in_valid the four products must match
// the reference model of ABM1..ABM4 for the captured operands, and out_valid
// must be high; without in_valid the outputs must hold. The test also
// counts how often each approximation actually changed a result - an
// approximate encoder (ABE-1, ABE-2), the dropped Neg bit of the regular
// array, the approximate compressor - and fails if one never did.
module tb_abm_top;
  import abm_ref_pkg::*;
  localparam int N = 8;
  localparam int W = 2 * N;
  localparam int P = 8;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] a = '0, b = '0;
  logic out_valid;
  logic [W-1:0] product_abm1, product_abm2, product_abm3, product_abm4;

  int checks = 0, failures = 0, ops = 0, holds = 0;
  int n_abe1 = 0, n_abe2 = 0, n_neg = 0, n_cmp = 0;
  logic [N-1:0] cap_a = '0, cap_b = '0;
  logic [W-1:0] last1;

  abm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string name, logic [W-1:0] got, longint unsigned exp);
    checks++;
    if (got != W'(exp)) begin
      failures++;
      if (failures < 10)
        $display("%s a=%h b=%h got %h exp %h", name, cap_a, cap_b, got, exp);
    end
  endtask

  task automatic note_mechanisms(logic [N-1:0] x, logic [N-1:0] y);
    longint unsigned e_arr;
    e_arr = ref_product(N, 0, 0, 1'b1, 1'b0, x, y);
    if (ref_product(N, P, 1, 1'b1, 1'b0, x, y) != e_arr) n_abe1++;
    if (ref_product(N, P, 2, 1'b1, 1'b0, x, y) != e_arr) n_abe2++;
    if (ref_neg(y[7], y[6], y[5])) n_neg++;
    if (ref_product(N, P, 1, 1'b1, 1'b1, x, y) != ref_product(N, P, 1, 1'b1, 1'b0, x, y))
      n_cmp++;
  endtask

  logic [N-1:0] corners [6] = '{8'h00, 8'h01, 8'hFF, 8'h80, 8'h7F, 8'h55};

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("out_valid after reset"); end
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      if (t < 36) begin
        a = corners[t / 6];
        b = corners[t % 6];
        in_valid = 1'b1;
      end else begin
        a = N'($urandom);
        b = N'($urandom);
        in_valid = ($urandom % 4) != 0;
      end
      @(posedge clk);
      if (in_valid) begin
        cap_a = a;
        cap_b = b;
      end
      #1;
      checks++;
      if (out_valid !== in_valid) begin
        failures++;
        $display("t=%0d out_valid=%b in_valid=%b", t, out_valid, in_valid);
      end
      if (in_valid) begin
        ops++;
        note_mechanisms(cap_a, cap_b);
      end else begin
        holds++;
        checks++;
        if (product_abm1 !== last1) begin failures++; $display("output not held"); end
      end
      expect_eq("ABM1", product_abm1, ref_product(N, P, 1, 1'b1, 1'b0, cap_a, cap_b));
      expect_eq("ABM2", product_abm2, ref_product(N, P, 2, 1'b1, 1'b0, cap_a, cap_b));
      expect_eq("ABM3", product_abm3, ref_product(N, P, 1, 1'b1, 1'b1, cap_a, cap_b));
      expect_eq("ABM4", product_abm4, ref_product(N, P, 2, 1'b1, 1'b1, cap_a, cap_b));
      last1 = product_abm1;
    end
    $display("operations=%0d holds=%0d abe1_errors=%0d abe2_errors=%0d neg_dropped=%0d compressor_errors=%0d",
             ops, holds, n_abe1, n_abe2, n_neg, n_cmp);
    checks += 5;
    if (holds == 0)  begin failures++; $display("no hold cycle"); end
    if (n_abe1 == 0) begin failures++; $display("ABE-1 never changed a result"); end
    if (n_abe2 == 0) begin failures++; $display("ABE-2 never changed a result"); end
    if (n_neg == 0)  begin failures++; $display("no Neg bit dropped"); end
    if (n_cmp == 0)  begin failures++; $display("compressor never changed a result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
