// sum_of_products: y = a0*b0 + a1*b1 with the two products registered.
//
// A small stand-alone example circuit, unrelated to the frequency
// translator chain: two 16-bit signed multipliers whose full 32-bit products
// are held in registers, and an adder that combines the registered products
// into the output. The output is the low 16 bits of the sum (two's
// complement wrap-around, as when the result is stored in a 16-bit integer).
//
// Timing: one cycle; y reflects the inputs of the previous clock edge. A
// synchronous active-low reset clears both product registers, so y is 0
// after reset.
//
// The structure (two multipliers, registers after them, one adder, 16-bit
// ports, active-low synchronous reset) follows the document; taking the low
// 16 bits of the sum is this design's reading of the 16-bit output.
module sum_of_products #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] a0,
  input  logic signed [W-1:0] b0,
  input  logic signed [W-1:0] a1,
  input  logic signed [W-1:0] b1,
  output logic signed [W-1:0] y
);

  logic signed [2*W-1:0] prod0, prod1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prod0 <= '0;
      prod1 <= '0;
    end else begin
      prod0 <= (2*W)'(a0) * (2*W)'(b0);
      prod1 <= (2*W)'(a1) * (2*W)'(b1);
    end
  end

  // only the low W bits of the sum are kept
  assign y = W'(prod0 + prod1);

endmodule
