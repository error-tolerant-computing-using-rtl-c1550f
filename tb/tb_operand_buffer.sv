// tb_operand_buffer: checks reset, load and hold of the operand buffer.
// Random data is offered with a random load strobe; the output must show the
// last loaded value one clock after the load and keep it otherwise.
module tb_operand_buffer;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] d = '0, q;
  logic [W-1:0] model;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  operand_buffer #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'hA5;
    load = 1;
    @(posedge clk);
    @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("reset value %h", q); end
    rst_n = 1;
    model = '0;
    for (int t = 0; t < 500; t++) begin
      d = W'($urandom);
      load = ($urandom % 3) != 0;
      @(posedge clk);
      if (load) begin model = d; loads++; end else holds++;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("t=%0d q=%h expected %h", t, q, model);
      end
    end
    checks++;
    if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
