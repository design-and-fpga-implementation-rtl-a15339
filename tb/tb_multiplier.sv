// tb_multiplier: corner and random products of the 8x8 multiplier.
module tb_multiplier;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  multiplier #(.W(8)) dut (.a, .b, .p);

  task automatic check(input int unsigned ai, input int unsigned bi);
    a = 8'(ai); b = 8'(bi);
    #1;
    checks++;
    if (int'(p) != int'(ai * bi)) begin
      failures++;
      $display("FAIL %0d*%0d = %0d", ai, bi, p);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(255, 255); check(255, 1); check(1, 255); check(128, 2);
    for (int i = 0; i < 500; i++) check($urandom % 256, $urandom % 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
