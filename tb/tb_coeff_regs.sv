// tb_coeff_regs: parallel load on LE and hold otherwise, against a model.
module tb_coeff_regs;
  logic       clk = 0, rst, le;
  logic [7:0] w_in [4], w [4], model [4];
  int checks = 0, failures = 0;

  coeff_regs #(.W(8), .TAPS(4)) dut (.clk, .rst, .le, .w_in, .w);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; le = 1;
    for (int k = 0; k < 4; k++) begin w_in[k] = 8'hAA; model[k] = 0; end
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      le = 1'($urandom);
      for (int k = 0; k < 4; k++) w_in[k] = 8'($urandom);
      @(posedge clk);
      if (le) for (int k = 0; k < 4; k++) model[k] = w_in[k];
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (w[k] !== model[k]) begin failures++; $display("FAIL w%0d=%0d exp=%0d", k, w[k], model[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
