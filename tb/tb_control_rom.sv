// tb_control_rom: walks the whole control memory and checks the structure
// of the microprogram: one dispatch word, one set-up word, then for each of
// the seven outputs a shift of the right sample (zero-masked after the
// fourth), four multiply-accumulates over taps 0..3 (clear-sum on the
// first), and a store; the last store and all unused words jump to 0.
module tb_control_rom;
  import fir_pkg::*;
  logic [UADDR_W-1:0] addr;
  uinstr_t            u;
  int checks = 0, failures = 0;

  control_rom dut (.addr, .uinstr(u));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL addr=%0d %s", addr, what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    addr = 0; #1;
    chk(u.seq == SEQ_MAP && u.ctrl == '0, "dispatch word");
    addr = 1; #1;
    chk(u.ctrl.le && u.ctrl.ld1 && u.seq == SEQ_INC, "set-up word");
    chk(!u.ctrl.ld0 && !u.ctrl.lacc && !u.ctrl.yl, "set-up has no other action");
    a = 2;
    for (int n = 0; n < 7; n++) begin
      addr = UADDR_W'(a); #1;
      chk(u.ctrl.ld0 && !u.ctrl.lacc && !u.ctrl.yl && !u.ctrl.le, $sformatf("shift word of y(%0d)", n));
      chk({u.ctrl.d1, u.ctrl.d0} == 2'(n), "sample select");
      chk(u.ctrl.dm == (n >= 4), "zero mask");
      chk(u.seq == SEQ_INC, "shift word sequencing");
      a++;
      for (int k = 0; k < 4; k++) begin
        addr = UADDR_W'(a); #1;
        chk(u.ctrl.lacc && u.ctrl.ps && {u.ctrl.s1, u.ctrl.s0} == 2'(k), $sformatf("mac tap %0d", k));
        chk(u.ctrl.cs == (k == 0), "clear-sum on the first tap only");
        chk(!u.ctrl.ld0 && !u.ctrl.yl && u.seq == SEQ_INC, "mac word has no other action");
        a++;
      end
      addr = UADDR_W'(a); #1;
      chk(u.ctrl.yl && !u.ctrl.lacc && !u.ctrl.ld0, "store word");
      if (n == 6) chk(u.seq == SEQ_JUMP && u.addr == 0, "last store returns to dispatch");
      else        chk(u.seq == SEQ_INC, "store word continues");
      a++;
    end
    chk(a == 44, "program length");
    for (; a < 64; a++) begin
      addr = UADDR_W'(a); #1;
      chk(u.seq == SEQ_JUMP && u.addr == 0 && u.ctrl == '0, "unused word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
