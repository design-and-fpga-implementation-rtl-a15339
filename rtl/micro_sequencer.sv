// micro_sequencer: microprogram counter and next-address logic.
//
// Holds the microprogram address upc. On each rising clock edge it moves
// on according to the sequencing field of the current microinstruction:
//   SEQ_INC   upc + 1
//   SEQ_JUMP  the word's address field
//   SEQ_MAP   the start address of the routine selected by branch_address:
//             ROUTINE_FILTER (3'b001) starts a filter run at address 1;
//             every other value maps to address 0, so the controller waits
//             in the dispatch word.
// Synchronous, active-high reset to address 0. A branch-address input
// exists on the filter's controller; using it as the routine selector of a
// dispatch (mapping) step is this design's choice.
module micro_sequencer
  import fir_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  seq_t               seq,
  input  logic [UADDR_W-1:0] jump_addr,
  input  logic [2:0]         branch_address,
  output logic [UADDR_W-1:0] upc
);
  logic [UADDR_W-1:0] map_addr, next;

  always_comb begin
    map_addr = (branch_address == ROUTINE_FILTER) ? UADDR_W'(1) : '0;
    unique case (seq)
      SEQ_JUMP: next = jump_addr;
      SEQ_MAP:  next = map_addr;
      default:  next = upc + 1'b1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) upc <= '0;
    else     upc <= next;
  end
endmodule
