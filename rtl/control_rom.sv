// control_rom: the control memory holding the filter's microprogram.
//
// A read-only memory of 2^UADDR_W microinstructions, read combinationally:
// uinstr = ROM[addr]. Each word is a control word (one bit per control
// line, see fir_pkg) plus a sequencing field and a jump address. The
// contents are defined by the function uword() below, so the microprogram
// is changed by editing that one function, which is the point of a
// microprogrammed controller. Storing the microprogram in a ROM follows the
// filter description; the microprogram itself is this design's own.
//
// Microprogram (TAPS = 4, NOUT = 7, STEPS = TAPS + 2 = 6):
//   0            dispatch: go to the routine named by branch_address
//   1            LE, LD1: load w0..w3, clear delay line and sample counter
//   for n = 0 .. NOUT-1, base = 2 + STEPS*n:
//   base         LD0: shift sample n in (D1/D0 = n; dm = 1 when n >= TAPS)
//   base+1+k     S1/S0 = k, PS, Lacc (CS also when k = 0): acc += w_k*x(n-k)
//   base+1+TAPS  YL: store acc into output register n; the last one jumps to 0
//   all other addresses jump to 0.
// One run therefore takes UP_LEN = 44 clock cycles from the dispatch word.
module control_rom
  import fir_pkg::*;
(
  input  logic [UADDR_W-1:0] addr,
  output uinstr_t            uinstr
);
  function automatic uinstr_t uword(int unsigned a);
    uinstr_t     u;
    int unsigned n, step;
    logic [1:0]  k;
    u      = '0;
    u.seq  = SEQ_INC;
    u.addr = '0;
    if (a == 0) begin
      u.seq = SEQ_MAP;
    end else if (a == 1) begin
      u.ctrl.le  = 1'b1;
      u.ctrl.ld1 = 1'b1;
    end else if (a < UP_LEN) begin
      n    = (a - 2) / STEPS;
      step = (a - 2) % STEPS;
      if (step == 0) begin
        u.ctrl.ld0 = 1'b1;
        u.ctrl.d1  = n[1];
        u.ctrl.d0  = n[0];
        u.ctrl.dm  = (n >= TAPS);
      end else if (step <= TAPS) begin
        k           = 2'(step - 1);
        u.ctrl.s1   = k[1];
        u.ctrl.s0   = k[0];
        u.ctrl.ps   = 1'b1;
        u.ctrl.lacc = 1'b1;
        u.ctrl.cs   = (step == 1);
      end else begin
        u.ctrl.yl = 1'b1;
        if (n == NOUT - 1) u.seq = SEQ_JUMP;
      end
    end else begin
      u.seq = SEQ_JUMP;
    end
    return u;
  endfunction

  always_comb uinstr = uword(int'(addr));
endmodule
