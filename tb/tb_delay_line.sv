// tb_delay_line: shift, clear and hold of the four data registers,
// against a queue model of the last four samples.
module tb_delay_line;
  logic       clk = 0, rst, clr, shift;
  logic [7:0] din, x [4], model [4];
  int checks = 0, failures = 0;

  delay_line #(.W(8), .TAPS(4)) dut (.clk, .rst, .clr, .shift, .din, .x);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; shift = 1; din = 8'h55;
    @(posedge clk); #1;
    rst = 0;
    for (int k = 0; k < 4; k++) model[k] = 0;
    for (int i = 0; i < 300; i++) begin
      clr   = ($urandom % 10) == 0;
      shift = 1'($urandom);
      din   = 8'($urandom);
      @(posedge clk);
      if (clr) for (int k = 0; k < 4; k++) model[k] = 0;
      else if (shift) begin
        for (int k = 3; k > 0; k--) model[k] = model[k-1];
        model[0] = din;
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (x[k] !== model[k]) begin failures++; $display("FAIL x(n-%0d)=%0d exp=%0d", k, x[k], model[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
