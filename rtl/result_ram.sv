// result_ram: the seven 16-bit output registers y(0)..y(6).
//
// A small register file. On a rising clock edge with we high, wdata is
// stored in register waddr (addresses NOUT and above are ignored). All
// registers are read in parallel; while rd is low the outputs read zero.
// Synchronous, active-high reset clears every register. The seven output
// registers follow the filter's controller; the read gating is this
// design's reading of its read input.
module result_ram #(
  parameter int unsigned W    = 16,
  parameter int unsigned N    = 7,
  parameter int unsigned AW   = 3
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          rd,
  output logic [W-1:0]  rdata [N]
);
  logic [W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) mem[i] <= '0;
    end else if (we && (32'(waddr) < N)) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) rdata[i] = rd ? mem[i] : '0;
  end
endmodule
