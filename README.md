# Sequential FIR filter with a microprogrammed controller

This is a small FIR filter that has one multiplier and one adder and does
one multiply-accumulate per clock cycle. A microprogram stored in a ROM
drives it. The filter takes four 8-bit coefficients `w0..w3` and four 8-bit
input samples. It produces the seven 16-bit outputs of their full linear
convolution:

    y(n) = sum_{k=0..3} w_k * x(n-k),   n = 0..6,   x(4) = x(5) = x(6) = 0

For example, `w = {1,2,2,1}` and `x = {1,2,3,3}` give
`y = {1,4,9,14,14,9,3}`.

The main idea is that the datapath has no control logic of its own. Every
cycle, a ROM word sets each control line directly: which tap to use,
whether to add the product, when to load a register. To change the
schedule, you edit the microprogram, not a state machine.

The RTL follows the architecture published in *Design and FPGA
implementation of sequential digital 7-tap FIR filter using microprogrammed
controller* (Singh et al.). That description gives:

- the block structure and the data widths;
- the top-level port names;
- the names of the control lines;
- three reference test cases.

It does not give the microprogram, the encoding of the control word, or the
meaning of most control lines. Those parts are this design's own, and the
section "Departures and choices" lists them. The "7" in "7-tap" is the
number of output samples. The filter itself has four coefficients.

## Datapath

```
 w0..w3 ──LE──► [w regs] ──► 4:1 mux ─┐
                               ▲ S1S0 ├─► 8x8 multiplier ─► (PS gate) ─┐
 sample ──LD0─► [x(n-0..n-3)]─► 4:1 mux ─┘                              ▼
 (LD1 clears)                                   ┌─(CS gate)◄─ acc ◄─ 16-bit adder
                                                └──────────────────────► ▲
                                                   acc ──Lacc──► y_filtered
```

- **Coefficient registers** (`coeff_regs`): four 8-bit registers. When LE
  is high, all four load in parallel.
- **Data registers** (`delay_line`): four 8-bit registers, x(n-0) to x(n-3),
  forming a delay line.
  - When LD0 is high, a new sample enters x(n-0) and every older sample
    moves one place down.
  - When LD1 is high, all four registers clear, so each run starts with an
    empty history.
- **Two 4:1 multiplexers** (`mux4`): both are steered by the same tap
  select, S1/S0. When S1/S0 = k, they present `w_k` and `x(n-k)` together.
  Sharing one select is what makes a delay line plus a pair of muxes
  compute a convolution.
- **Multiplier** (`multiplier`): 8x8 bits to 16 bits, unsigned.
- **Adder** (`adder`): 16 bits, wraps on overflow. Two gates sit on its
  inputs:
  - `b = PS ? product : 0`: PS is "product select".
  - `a = CS ? 0 : acc`: CS is "clear sum". The first tap of each output is
    issued with CS high, so no separate clear cycle is needed.
- **Accumulator** (`acc_reg`): 16 bits. It loads when Lacc is high. Its
  value is `y_filtered`.

`fir_datapath` wires these blocks together. Its control input is a single
12-bit control word (`fir_pkg::ctrl_t`).

## The microprogram

The control unit (`micro_controller`) has three parts:

- a microprogram counter with next-address logic (`micro_sequencer`);
- the control ROM (`control_rom`);
- a 3-bit output-sample counter, `count`.

Each ROM word has three fields:

| field  | bits | meaning |
|--------|------|---------|
| `ctrl` | 12   | LE, LD0, LD1, D1, D0, dm, S1, S0, PS, CS, Lacc, YL: one bit per control line |
| `seq`  | 2    | `SEQ_INC` (next word), `SEQ_JUMP` (go to `addr`), `SEQ_MAP` (dispatch on `branch_address`) |
| `addr` | 6    | jump target |

The control lines are combinational outputs of the ROM, so they depend only
on the current address.

The program is 44 words long. The ROM has 64 words, and every unused word
jumps to address 0.

| address | control lines | action |
|---|---|---|
| 0 | none | dispatch: if `branch_address == 3'b001`, go to 1; otherwise stay at 0 |
| 1 | LE, LD1 | load w0..w3; clear the delay line and `count` |
| 2+6n | LD0, D1/D0 = n, dm = (n >= 4) | shift input sample n in, or a zero for n = 4..6 |
| 3+6n+k, k = 0..3 | S1/S0 = k, PS, Lacc, and CS when k = 0 | acc ← (k = 0 ? 0 : acc) + w_k · x(n-k) |
| 7+6n | YL | store acc into output register `count`; `count` + 1. For n = 6, jump to 0 |

The words are not written out as a table in the RTL. The function `uword()`
in `control_rom.sv` generates them from the address, following the rule
above. That function is the one place to change the schedule. For example,
to drop the trailing zero samples, or to merge the store into the next
sample's shift word, you edit only `uword()`.

### Timing

Cycles are numbered from the cycle in which the controller is at address 0
and sees `branch_address = 001`:

- **Cycle 1:** w0..w3 are sampled.
- **Cycle 2+6n:** input sample n is sampled.
- **Cycle 7+6n:** y(n) is written. The new value appears on `controller_out(n+1)` after that clock edge.
- **Cycle 43:** y(6) is written. The controller is back at address 0 after 44 cycles.

While `branch_address` stays at 001, the filter runs again immediately. It
reloads the coefficients and samples each time.

## Top level: `main_controller`

| port | dir | width | function |
|---|---|---|---|
| `clk` | in | 1 | clock; every register is rising-edge triggered |
| `reset` | in | 1 | synchronous, active high; clears every register |
| `branch_address` | in | 3 | `001` runs the filter; any other value leaves it waiting |
| `w0..w3` | in | 8 | coefficients |
| `x_n, x_n_1, x_n_2, x_n_3` | in | 8 | input samples 0, 1, 2, 3 in time order |
| `write` | in | 1 | results are stored only while high |
| `read` | in | 1 | `controller_out1..7` show the results while high; they read 0 while low |
| `controller_out1..7` | out | 16 | y(0)..y(6) from seven output registers (`result_ram`) |
| `y_filtered` | out | 16 | the accumulator |
| `count` | out | 3 | index of the next output register to be written (7 after a run) |
| `CS, dm, D0, D1, Lacc, LD0, LD1, LE, PS, S0, S1, YL` | out | 1 | the control lines |

A third `mux4` in the top level picks which input sample enters the delay
line, using D1/D0. When dm is high, a zero enters instead.

With `write` low, the controller keeps running but the stored results do
not change.

## Departures and choices

These points are this design's decisions. The published description either
does not cover them or shows them only by name:

- **Control-line meanings.** The published description defines LE, S1/S0,
  PS and Lacc. CS, dm, D0, D1, LD0, LD1 and YL appear there only as names.
  Their functions here (clear sum, zero mask, sample select, shift, clear
  history, store) are chosen to fit the datapath.
- **Shared tap select.** The published datapath figure shows both
  multiplexers driven by S1/S0. This design takes that literally: the
  x-registers form a delay line, so the same select picks both `w_k` and
  `x(n-k)`.
- **Accumulator feedback.** The published figure draws no path from the
  register back to the adder. A multiply-accumulate needs one, so this
  design adds it.
- **`branch_address`** is used as a routine number at a dispatch word.
  **`read` and `write`** gate the output registers. Both interpretations
  are this design's.
- **Number format.** Arithmetic is unsigned.
- **Overflow.** The adder and output registers keep the published 16 bits
  and wrap. Four full-scale products (4·255·255) do not fit in 16 bits.
- **Reset.** Reset is synchronous and active high.
- **Coefficient input.** The block diagram shows a single 8-bit `W_Coeff`
  input. This design follows the top-level port list instead, with four
  parallel coefficient inputs.
- **Timing.** The cycle-level timing does not try to match any published
  waveform. A run takes 44 cycles.

## Files

- `rtl/fir_pkg.sv`: the widths, the microprogram layout constants, and the
  `ctrl_t`, `seq_t` and `uinstr_t` types.
- `rtl/`: one file per module, in bottom-up order:
  - `mux4`, `coeff_regs`, `delay_line`, `multiplier`, `adder`, `acc_reg`,
    `fir_datapath`;
  - `control_rom`, `micro_sequencer`, `micro_controller`;
  - `result_ram`, `main_controller`.
- `tb/tb_<module>.sv`: a self-checking testbench for each module. Each one
  prints `TB_RESULT checks=N failures=M`.
  - `tb_main_controller` runs the three reference cases, then 30 random
    cases against a convolution model, at full size.
  - It also checks that each y(n) is stored in cycle 7+6n.
  - It checks the idle, `write`=0, `read`=0 and reset behaviour.
  - It counts every control mechanism, and a mechanism that never occurs
    counts as a failure.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fir_pkg.sv tb/tb_main_controller.sv \
          --top-module tb_main_controller -Mdir obj && ./obj/Vtb_main_controller
```

Replace `tb_main_controller` with any other testbench name to run that
testbench instead. Lint a module with:

```
verilator --lint-only -Wall -Irtl rtl/fir_pkg.sv rtl/<module>.sv
```

Lint gives two expected warnings:

- `fir_datapath` does not use the D1, D0, dm and YL bits of the control
  word. Those bits drive the top-level sample selector and the output
  registers.
- `main_controller` leaves the microprogram-counter output unconnected.
