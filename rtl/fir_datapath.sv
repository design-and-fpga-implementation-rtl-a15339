// fir_datapath: sequential multiply-accumulate datapath of the FIR filter.
//
// Holds the four coefficients w0..w3 and the four delayed samples
// x(n-0)..x(n-3). One tap is processed per clock: the tap select S1/S0
// steers both 4:1 multiplexers to w_k and x(n-k), the multiplier forms
// w_k * x(n-k), the adder adds it to the accumulator, and Lacc stores the
// sum. After TAPS such cycles the accumulator holds
// y(n) = sum_k w_k * x(n-k), which is y_filtered.
//
// Adder operands: a = CS ? 0 : accumulator, b = PS ? product : 0. So the
// first tap of a sample is issued with CS high (no separate clear cycle),
// and CS with PS low clears the accumulator. This gating is this design's
// reading of the PS and CS control lines; the mux/multiplier/adder/register
// chain and the widths follow the filter's datapath.
//
// Control (all sampled on the rising edge, from the controller's control
// word): le loads w_in; ld1 clears the delay line; ld0 shifts x_data into
// x(n-0). Synchronous, active-high reset.
module fir_datapath
  import fir_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned AW    = ACC_W
) (
  input  logic           clk,
  input  logic           rst,
  input  ctrl_t          ctrl,
  input  logic [W-1:0]   w_in [TAPS],   // coefficients, loaded on le
  input  logic [W-1:0]   x_data,        // next sample, shifted in on ld0
  output logic [AW-1:0] y_filtered
);
  logic [W-1:0]       w [TAPS];   // coefficient registers
  logic [W-1:0]       x [TAPS];   // data registers, x[k] = x(n-k)
  logic [1:0]         tap;
  logic [W-1:0]       w_sel, x_sel;
  logic [2*W-1:0]     prod;
  logic [AW-1:0] acc, add_a, add_b, sum;

  assign tap = {ctrl.s1, ctrl.s0};

  coeff_regs #(.W(W), .TAPS(TAPS)) u_wregs (
    .clk, .rst, .le(ctrl.le), .w_in, .w
  );

  delay_line #(.W(W), .TAPS(TAPS)) u_xregs (
    .clk, .rst, .clr(ctrl.ld1), .shift(ctrl.ld0), .din(x_data), .x
  );

  mux4 #(.W(W)) u_wmux (.d(w), .sel(tap), .y(w_sel));
  mux4 #(.W(W)) u_xmux (.d(x), .sel(tap), .y(x_sel));

  multiplier #(.W(W)) u_mul (.a(w_sel), .b(x_sel), .p(prod));

  always_comb begin
    add_a = ctrl.cs ? '0 : acc;
    add_b = ctrl.ps ? AW'(prod) : '0;
  end

  adder #(.W(AW)) u_add (.a(add_a), .b(add_b), .s(sum));

  acc_reg #(.W(AW)) u_acc (.clk, .rst, .load(ctrl.lacc), .d(sum), .q(acc));

  assign y_filtered = acc;
endmodule
