// tb_acc_reg: reset, load and hold of the accumulator register against a
// reference model.
module tb_acc_reg;
  logic        clk = 0, rst, load;
  logic [15:0] d, q, model;
  int checks = 0, failures = 0;

  acc_reg #(.W(16)) dut (.clk, .rst, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 1; d = 16'hFFFF;
    @(posedge clk); #1;
    checks++; if (q !== 16'h0) begin failures++; $display("FAIL reset q=%h", q); end
    model = 0;
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      load = 1'($urandom); d = 16'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
