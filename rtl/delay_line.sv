// delay_line: the data registers x(n-0)..x(n-3), a tapped delay line.
//
// On a rising clock edge with shift high, the new sample din enters x(n-0)
// and every older sample moves one place on: x(n-k) <= x(n-k+1). With clr
// high all registers are cleared instead (clr wins over shift). A
// synchronous, active-high reset also clears them. The delay-line
// structure follows the direct-form filter; clr (driven by LD1) is this
// design's way of starting each run from an all-zero history.
module delay_line #(
  parameter int unsigned W    = 8,
  parameter int unsigned TAPS = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic [W-1:0] x [TAPS]   // x[k] = x(n-k)
);
  always_ff @(posedge clk) begin
    if (rst || clr) begin
      for (int k = 0; k < TAPS; k++) x[k] <= '0;
    end else if (shift) begin
      x[0] <= din;
      for (int k = 1; k < TAPS; k++) x[k] <= x[k-1];
    end
  end
endmodule
