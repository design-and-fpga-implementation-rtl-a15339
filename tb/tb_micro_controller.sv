// tb_micro_controller: runs the control unit alone. With branch_address
// other than 001 it must wait at the dispatch word with all control lines
// low. With 001 it must produce, per run, seven stores with count 0..6,
// 28 multiply-accumulates, seven sample shifts, one coefficient load, and
// return to dispatch after exactly 44 cycles; it must then start again.
module tb_micro_controller;
  import fir_pkg::*;
  logic               clk = 0, rst;
  logic [2:0]         branch_address;
  ctrl_t              ctrl;
  logic [2:0]         count;
  logic [UADDR_W-1:0] upc;
  int checks = 0, failures = 0;

  micro_controller dut (.clk, .rst, .branch_address, .ctrl, .count, .upc);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; branch_address = 3'b000;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 10; i++) begin
      branch_address = (i % 2) ? 3'b000 : 3'b111;
      chk(upc == 0 && ctrl == '0, "idle while branch_address != 001");
      @(posedge clk); #1;
    end
    branch_address = 3'b001;
    for (int r = 0; r < 3; r++) begin
      int cyc, n_yl, n_mac, n_ld0, n_le;
      cyc = 0; n_yl = 0; n_mac = 0; n_ld0 = 0; n_le = 0;
      chk(upc == 0, "run starts at the dispatch word");
      do begin
        if (ctrl.yl) begin
          chk(int'(count) == n_yl, $sformatf("count=%0d at store %0d", count, n_yl));
          n_yl++;
        end
        if (ctrl.lacc && ctrl.ps) n_mac++;
        if (ctrl.ld0) n_ld0++;
        if (ctrl.le)  n_le++;
        @(posedge clk); #1;
        cyc++;
      end while (upc != 0 && cyc < 200);
      chk(cyc == 44, $sformatf("run length %0d cycles", cyc));
      chk(n_yl == 7 && n_mac == 28 && n_ld0 == 7 && n_le == 1,
          $sformatf("yl=%0d mac=%0d ld0=%0d le=%0d", n_yl, n_mac, n_ld0, n_le));
      chk(count == 3'd7, "count after the run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
