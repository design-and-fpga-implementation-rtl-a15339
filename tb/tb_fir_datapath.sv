// tb_fir_datapath: drives the datapath's control word by hand through the
// filter sequence (load coefficients, clear, then per sample: shift and
// four multiply-accumulates) and checks y_filtered after each sample
// against a convolution computed here. Also checks that PS low adds
// nothing and that CS with PS low clears the sum.
module tb_fir_datapath;
  import fir_pkg::*;
  logic        clk = 0, rst;
  ctrl_t       ctrl;
  logic [7:0]  w_in [4], x_data;
  logic [15:0] y_filtered;
  int checks = 0, failures = 0;
  int unsigned wv [4], xv [7];

  fir_datapath dut (.clk, .rst, .ctrl, .w_in, .x_data, .y_filtered);

  always #5 clk = ~clk;

  task automatic step(input ctrl_t c);
    ctrl = c;
    @(posedge clk); #1;
    ctrl = '0;
  endtask

  task automatic expect_y(input int unsigned exp, input string what);
    checks++;
    if (int'(y_filtered) != int'(exp % 65536)) begin
      failures++; $display("FAIL %s y=%0d exp=%0d", what, y_filtered, exp % 65536);
    end
  endtask

  task automatic run(input int unsigned w [4], input int unsigned xs [4]);
    ctrl_t c;
    for (int k = 0; k < 4; k++) w_in[k] = 8'(w[k]);
    c = '0; c.le = 1; c.ld1 = 1; step(c);
    for (int n = 0; n < 7; n++) begin
      int unsigned exp = 0;
      x_data = (n < 4) ? 8'(xs[n]) : 8'h00;
      c = '0; c.ld0 = 1; step(c);
      for (int k = 0; k < 4; k++) begin
        c = '0; c.s1 = k[1]; c.s0 = k[0]; c.ps = 1; c.lacc = 1; c.cs = (k == 0);
        step(c);
      end
      for (int k = 0; k < 4; k++)
        if (n - k >= 0 && n - k < 4) exp += w[k] * xs[n-k];
      expect_y(exp, $sformatf("y(%0d)", n));
      // a cycle with PS low and Lacc high must leave the sum unchanged
      c = '0; c.lacc = 1; step(c);
      expect_y(exp, "hold");
    end
    c = '0; c.cs = 1; c.lacc = 1; step(c);
    expect_y(0, "clear");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0; x_data = 0;
    for (int k = 0; k < 4; k++) w_in[k] = 0;
    rst = 1; @(posedge clk); #1; rst = 0;
    run('{1, 2, 2, 1}, '{1, 2, 3, 3});
    for (int r = 0; r < 20; r++) begin
      int unsigned w [4], xs [4];
      for (int k = 0; k < 4; k++) begin w[k] = $urandom % 256; xs[k] = $urandom % 256; end
      run(w, xs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
