// operand_buffer: register that holds one multiplier operand.
//
// The multiplier and the multiplicand each pass through a buffer before the
// Booth encoder and the partial-product generator. Here a buffer is a
// W-bit register that captures d on a clock edge where load is high and
// otherwise keeps its value; an active-low synchronous reset clears it.
// q follows d one clock after load. Making the buffer a clocked register,
// its reset and its load enable are this design's choices.
module operand_buffer #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
