// coeff_regs: the four tap coefficient registers w0..w3.
//
// All four registers load the coefficient inputs in parallel on the rising
// clock edge when the load enable LE is high, and hold otherwise. A
// synchronous, active-high reset clears them. Loading on LE follows the
// filter description; the parallel load and the reset are this design's
// choice.
module coeff_regs #(
  parameter int unsigned W    = 8,
  parameter int unsigned TAPS = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         le,
  input  logic [W-1:0] w_in [TAPS],
  output logic [W-1:0] w    [TAPS]
);
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) w[k] <= '0;
    end else if (le) begin
      for (int k = 0; k < TAPS; k++) w[k] <= w_in[k];
    end
  end
endmodule
