// micro_controller: the microprogrammed control unit of the filter.
//
// The sequencer's address reads the control ROM; the word read out drives
// the datapath (ctrl) for this cycle and tells the sequencer where to go
// next. A 3-bit output-sample counter, count, names the output register
// that the next YL writes: LD1 clears it at the start of a run and each YL
// advances it, so it reads 0..6 while the seven outputs are produced and 7
// after the last one. Control lines are combinational from the ROM (Moore
// style: they depend only on upc). Synchronous, active-high reset.
module micro_controller
  import fir_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [2:0]         branch_address,
  output ctrl_t              ctrl,
  output logic [CNT_W-1:0]   count,
  output logic [UADDR_W-1:0] upc
);
  uinstr_t uinstr;

  micro_sequencer u_seq (
    .clk, .rst, .seq(uinstr.seq), .jump_addr(uinstr.addr), .branch_address, .upc
  );

  control_rom u_rom (.addr(upc), .uinstr);

  assign ctrl = uinstr.ctrl;

  always_ff @(posedge clk) begin
    if (rst || ctrl.ld1) count <= '0;
    else if (ctrl.yl)    count <= count + 1'b1;
  end
endmodule
