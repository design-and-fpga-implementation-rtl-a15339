// tb_result_ram: writes, out-of-range writes, hold and read gating of the
// seven output registers, against a model.
module tb_result_ram;
  logic        clk = 0, rst, we, rd;
  logic [2:0]  waddr;
  logic [15:0] wdata, rdata [7], model [7];
  int checks = 0, failures = 0;

  result_ram #(.W(16), .N(7), .AW(3)) dut (.clk, .rst, .we, .waddr, .wdata, .rd, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 1; waddr = 0; wdata = 16'h1234; rd = 1;
    for (int i = 0; i < 7; i++) model[i] = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom); waddr = 3'($urandom); wdata = 16'($urandom); rd = ($urandom % 4) != 0;
      @(posedge clk);
      if (we && waddr < 7) model[waddr] = wdata;
      #1;
      for (int k = 0; k < 7; k++) begin
        checks++;
        if (rdata[k] !== (rd ? model[k] : 16'h0)) begin
          failures++; $display("FAIL reg%0d=%h exp=%h rd=%0d", k, rdata[k], model[k], rd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
