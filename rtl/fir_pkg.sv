// fir_pkg: types and constants shared by the sequential 4-coefficient FIR
// filter and its microprogrammed controller.
//
// The filter convolves four 8-bit coefficients w0..w3 with four 8-bit
// input samples and produces the seven 16-bit outputs of the full linear
// convolution, y(n) = sum_k w_k * x(n-k), n = 0..6. The 8-bit data width,
// the 16-bit product/sum width, the four coefficients and the seven outputs
// follow the filter description; the microinstruction layout below is this
// design's own.
//
// Control word: one bit per control line. The line names (LE, LD0, LD1,
// D1, D0, dm, S1, S0, PS, CS, Lacc, YL) are those of the filter's control
// outputs. LE, S1/S0, PS and Lacc carry the meaning the filter description
// gives them; the meaning of the others is this design's choice:
//   le   - load the coefficient registers w0..w3
//   ld0  - shift a new sample into the first data register x(n-0)
//   ld1  - clear the data registers and the output-sample counter
//   d1,d0- which of the four input samples is shifted in
//   dm   - data mask: shift in zero instead (the trailing zeros of a run)
//   s1,s0- tap select of both 4:1 multiplexers (w_k and x(n-k))
//   ps   - product select: the adder adds the product (else zero)
//   cs   - clear sum: the adder ignores the accumulator (first tap)
//   lacc - load the accumulator with the adder output
//   yl   - Y load: store the accumulator into output register y(count)
package fir_pkg;

  localparam int unsigned DATA_W = 8;   // sample and coefficient width
  localparam int unsigned ACC_W  = 16;  // product, sum and output width
  localparam int unsigned TAPS   = 4;   // coefficients w0..w3
  localparam int unsigned NOUT   = 2 * TAPS - 1;  // outputs per run (7)
  localparam int unsigned CNT_W  = 3;   // width of the output-sample counter

  // Microprogram layout: one dispatch word, one set-up word, then for each
  // output sample: shift, TAPS multiply-accumulate words, store.
  localparam int unsigned STEPS   = TAPS + 2;
  localparam int unsigned UP_LEN  = 2 + NOUT * STEPS;   // 44 words used
  localparam int unsigned UADDR_W = 6;                  // 64-word control memory

  // Routine number on branch_address that starts a filter run.
  localparam logic [2:0] ROUTINE_FILTER = 3'b001;

  typedef struct packed {
    logic le;
    logic ld0;
    logic ld1;
    logic d1;
    logic d0;
    logic dm;
    logic s1;
    logic s0;
    logic ps;
    logic cs;
    logic lacc;
    logic yl;
  } ctrl_t;

  // How the sequencer forms the next microprogram address.
  typedef enum logic [1:0] {
    SEQ_INC  = 2'd0,  // next = current + 1
    SEQ_JUMP = 2'd1,  // next = the word's address field
    SEQ_MAP  = 2'd2   // next = start address of the routine on branch_address
  } seq_t;

  typedef struct packed {
    ctrl_t               ctrl;
    seq_t                seq;
    logic [UADDR_W-1:0]  addr;
  } uinstr_t;

endpackage
