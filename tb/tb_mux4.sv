// tb_mux4: exhaustive select check of the 4:1 selector with random data.
module tb_mux4;
  logic [7:0] d [4];
  logic [1:0] sel;
  logic [7:0] y;
  int checks = 0, failures = 0;

  mux4 #(.W(8)) dut (.d, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int i = 0; i < 4; i++) d[i] = 8'($urandom);
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (y !== d[s]) begin
          failures++;
          $display("FAIL sel=%0d y=%0d exp=%0d", s, y, d[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
