// tb_adder: corner and random sums of the 16-bit adder, including wrap.
module tb_adder;
  logic [15:0] a, b, s;
  int checks = 0, failures = 0;

  adder #(.W(16)) dut (.a, .b, .s);

  task automatic check(input int unsigned ai, input int unsigned bi);
    a = 16'(ai); b = 16'(bi);
    #1;
    checks++;
    if (int'(s) != int'((ai + bi) % 65536)) begin
      failures++;
      $display("FAIL %0d+%0d = %0d", ai, bi, s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(65535, 1); check(40000, 40000); check(1, 2);
    for (int i = 0; i < 500; i++) check($urandom % 65536, $urandom % 65536);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
