// abm_top: the four approximate radix-4 Booth multipliers ABM1..ABM4 behind
// a pair of operand buffers.
//
// The multiplicand a and the multiplier b are captured in operand buffers
// when in_valid is high. The buffered operands drive four combinational
// approximate Booth multipliers side by side:
//   product_abm1: approximate encoder ABE-1 + approximate regular PP array
//   product_abm2: approximate encoder ABE-2 + approximate regular PP array
//   product_abm3: ABE-1 + approximate regular PP array + approximate 4-2
//                 compressors
//   product_abm4: ABE-2 + approximate regular PP array + approximate 4-2
//                 compressors
// All four use the same approximation factor P. Timing: out_valid rises one
// clock after a cycle with in_valid high, and the four products belong to
// the operands captured at that edge; they hold until the next capture.
// Reset is active-low and synchronous. The buffers as registers and the
// valid flag are this design's choices.
module abm_top
  import abm_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  parameter int unsigned P = DEFAULT_P
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-1:0] product_abm1,
  output logic [2*N-1:0] product_abm2,
  output logic [2*N-1:0] product_abm3,
  output logic [2*N-1:0] product_abm4
);
  logic [N-1:0] a_q;
  logic [N-1:0] b_q;

  operand_buffer #(.W(N)) u_buf_a (
    .clk(clk), .rst_n(rst_n), .load(in_valid), .d(a), .q(a_q)
  );
  operand_buffer #(.W(N)) u_buf_b (
    .clk(clk), .rst_n(rst_n), .load(in_valid), .d(b), .q(b_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  approx_booth_multiplier #(
    .N(N), .P(P), .ENC(ENC_ABE1), .APPROX_ARRAY(1'b1), .APPROX_COMP(1'b0)
  ) u_abm1 (.a(a_q), .b(b_q), .product(product_abm1));

  approx_booth_multiplier #(
    .N(N), .P(P), .ENC(ENC_ABE2), .APPROX_ARRAY(1'b1), .APPROX_COMP(1'b0)
  ) u_abm2 (.a(a_q), .b(b_q), .product(product_abm2));

  approx_booth_multiplier #(
    .N(N), .P(P), .ENC(ENC_ABE1), .APPROX_ARRAY(1'b1), .APPROX_COMP(1'b1)
  ) u_abm3 (.a(a_q), .b(b_q), .product(product_abm3));

  approx_booth_multiplier #(
    .N(N), .P(P), .ENC(ENC_ABE2), .APPROX_ARRAY(1'b1), .APPROX_COMP(1'b1)
  ) u_abm4 (.a(a_q), .b(b_q), .product(product_abm4));
endmodule
