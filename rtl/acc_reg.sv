// acc_reg: the accumulator register at the end of the datapath.
//
// Takes d on the rising clock edge when load (Lacc) is high and holds
// otherwise; a synchronous, active-high reset clears it. Its output is the
// running sum fed back to the adder and, at the end of each output sample,
// the filtered value. Loading on Lacc follows the filter description.
module acc_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end
endmodule
