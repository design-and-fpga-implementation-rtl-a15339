// mux4: 4:1 data selector.
//
// Passes input d[sel] to y, purely combinationally. The datapath uses two
// of them, both steered by the tap select S1/S0: one picks coefficient w_k,
// the other the delayed sample x(n-k). The top uses a third one to pick
// which input sample enters the delay line. The 4:1 structure and the
// 8-bit width follow the filter's datapath; the width is a parameter.
module mux4 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] d [4],
  input  logic [1:0]   sel,
  output logic [W-1:0] y
);
  always_comb y = d[sel];
endmodule
