// adder: W-bit adder of the product and the running sum.
//
// Combinational. The sum wraps modulo 2^W. The 16-bit width is the
// filter's own; note that four full-scale 8x8 products (4 * 255 * 255)
// exceed it, so large coefficients with large samples overflow.
module adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  always_comb s = a + b;
endmodule
