// multiplier: unsigned W x W -> 2W multiplier.
//
// Combinational; the product of two 8-bit operands is 16 bits wide, so it
// never overflows. Unsigned operands are this design's choice: the filter
// description uses only non-negative test values.
module multiplier #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  always_comb p = a * b;
endmodule
