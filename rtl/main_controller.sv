// main_controller: sequential 4-coefficient FIR filter with a
// microprogrammed controller (top level).
//
// Computes the seven outputs of the full convolution of four coefficients
// w0..w3 with four input samples x_n, x_n_1, x_n_2, x_n_3 (taken in that
// order as samples 0..3, followed by three zero samples):
//   y(n) = sum_{k=0..3} w_k * x(n-k),  n = 0..6
// e.g. w = {1,2,2,1}, x = {1,2,3,3} gives y = {1,4,9,14,14,9,3}.
//
// Structure: the microprogrammed control unit steps through its ROM and
// drives the datapath (two 4:1 muxes, an 8x8 multiplier, a 16-bit adder
// and the accumulator), one multiply-accumulate per clock. A third 4:1 mux,
// steered by D1/D0 and masked by dm, picks the sample that enters the
// delay line. Each finished y(n) is stored by YL into output register
// count, and the seven registers appear on controller_out1..7.
//
// Interface (names as on the filter's top level):
//   reset           synchronous, active high
//   branch_address  3'b001 runs the filter, repeatedly while it stays 001;
//                   any other value leaves the controller waiting
//   write           results are stored only while write is high
//   read            controller_out1..7 show the results while read is high,
//                   zero otherwise
//   CS..YL, count   the control lines and sample counter, brought out
//   y_filtered      the accumulator (the filtered value being built)
// Timing: one run takes 44 clock cycles, from the cycle in which the
// controller sees branch_address = 001 to the cycle after the seventh YL;
// y(n) is written at the end of cycle 7 + 6n of the run. Coefficients and
// samples are sampled in the second cycle (LE) and in the first cycle of
// each output sample (LD0) respectively.
module main_controller
  import fir_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        read,
  input  logic        write,
  input  logic [2:0]  branch_address,
  input  logic [7:0]  w0,
  input  logic [7:0]  w1,
  input  logic [7:0]  w2,
  input  logic [7:0]  w3,
  input  logic [7:0]  x_n,
  input  logic [7:0]  x_n_1,
  input  logic [7:0]  x_n_2,
  input  logic [7:0]  x_n_3,
  output logic [15:0] controller_out1,
  output logic [15:0] controller_out2,
  output logic [15:0] controller_out3,
  output logic [15:0] controller_out4,
  output logic [15:0] controller_out5,
  output logic [15:0] controller_out6,
  output logic [15:0] controller_out7,
  output logic [15:0] y_filtered,
  output logic [2:0]  count,
  output logic        CS,
  output logic        dm,
  output logic        D0,
  output logic        D1,
  output logic        Lacc,
  output logic        LD0,
  output logic        LD1,
  output logic        LE,
  output logic        PS,
  output logic        S0,
  output logic        S1,
  output logic        YL
);
  ctrl_t              ctrl;
  logic [7:0]         w_in   [TAPS];
  logic [7:0]         x_in   [TAPS];
  logic [7:0]         sample, x_data;
  logic [15:0]        yout   [NOUT];

  assign w_in = '{w0, w1, w2, w3};
  assign x_in = '{x_n, x_n_1, x_n_2, x_n_3};

  micro_controller u_ctrl (
    .clk, .rst(reset), .branch_address, .ctrl, .count, .upc()
  );

  // Input sample selection: sample {D1,D0}, or zero when dm is set.
  mux4 #(.W(8)) u_smux (.d(x_in), .sel({ctrl.d1, ctrl.d0}), .y(sample));
  assign x_data = ctrl.dm ? 8'h00 : sample;

  fir_datapath u_dp (
    .clk, .rst(reset), .ctrl, .w_in, .x_data, .y_filtered
  );

  result_ram #(.W(16), .N(NOUT), .AW(CNT_W)) u_ram (
    .clk, .rst(reset), .we(ctrl.yl && write), .waddr(count),
    .wdata(y_filtered), .rd(read), .rdata(yout)
  );

  assign controller_out1 = yout[0];
  assign controller_out2 = yout[1];
  assign controller_out3 = yout[2];
  assign controller_out4 = yout[3];
  assign controller_out5 = yout[4];
  assign controller_out6 = yout[5];
  assign controller_out7 = yout[6];

  assign CS   = ctrl.cs;
  assign dm   = ctrl.dm;
  assign D0   = ctrl.d0;
  assign D1   = ctrl.d1;
  assign Lacc = ctrl.lacc;
  assign LD0  = ctrl.ld0;
  assign LD1  = ctrl.ld1;
  assign LE   = ctrl.le;
  assign PS   = ctrl.ps;
  assign S0   = ctrl.s0;
  assign S1   = ctrl.s1;
  assign YL   = ctrl.yl;
endmodule
