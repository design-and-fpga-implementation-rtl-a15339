// tb_main_controller: end-to-end test of the filter at its default sizes.
//
// Runs the three reference cases (coefficients, inputs, expected outputs):
//   w = {1,2,2,1}, x = {1,2,3,3}  -> y = {1,4,9,14,14,9,3}
//   w = {3,6,6,5}, x = {2,10,3,3} -> y = {6,42,81,97,86,33,15}
//   w = {5,4,4,1}, x = {3,9,7,7}  -> y = {15,57,83,102,65,35,7}
// then random cases checked against a convolution computed here (mod 2^16).
// Also checks: idle while branch_address != 001, the 44-cycle run length
// (y(6) lands in the last cycle, not earlier), that write = 0 leaves the
// stored results alone while runs continue, that read = 0 zeroes the
// outputs, and reset. Each mechanism is counted and must happen.
module tb_main_controller;
  logic        clk = 0, reset, read, write;
  logic [2:0]  branch_address;
  logic [7:0]  w0, w1, w2, w3, x_n, x_n_1, x_n_2, x_n_3;
  logic [15:0] controller_out1, controller_out2, controller_out3, controller_out4,
               controller_out5, controller_out6, controller_out7, y_filtered;
  logic [2:0]  count;
  logic        CS, dm, D0, D1, Lacc, LD0, LD1, LE, PS, S0, S1, YL;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_le = 0, n_ld1 = 0, n_ld0 = 0, n_dm = 0, n_cs = 0, n_mac = 0;
  int n_store = 0, n_store_blocked = 0, n_idle = 0, n_read_off = 0, n_reset = 0;

  main_controller dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (!reset) begin
    if (LE)  n_le++;
    if (LD1) n_ld1++;
    if (LD0) n_ld0++;
    if (LD0 && dm) n_dm++;
    if (CS && PS) n_cs++;
    if (Lacc && PS) n_mac++;
    if (YL && write)  n_store++;
    if (YL && !write) n_store_blocked++;
    if (branch_address != 3'b001 && !(LE | LD0 | LD1 | Lacc | YL)) n_idle++;
  end

  function automatic logic [15:0] outs(input int i);
    case (i)
      0: return controller_out1;  1: return controller_out2;
      2: return controller_out3;  3: return controller_out4;
      4: return controller_out5;  5: return controller_out6;
      default: return controller_out7;
    endcase
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_outs(input int unsigned exp [7], input string tag);
    for (int i = 0; i < 7; i++)
      chk(outs(i) == 16'(exp[i]), $sformatf("%s y(%0d)=%0d exp=%0d", tag, i, outs(i), 16'(exp[i])));
  endtask

  function automatic void conv(input int unsigned w [4], input int unsigned x [4],
                               output int unsigned y [7]);
    for (int n = 0; n < 7; n++) begin
      y[n] = 0;
      for (int k = 0; k < 4; k++)
        if (n - k >= 0 && n - k < 4) y[n] += w[k] * x[n-k];
    end
  endfunction

  // One run from the idle state; checks the run length and the results.
  task automatic run_case(input int unsigned w [4], input int unsigned x [4],
                          input int unsigned exp [7], input string tag);
    {w0, w1, w2, w3} = {8'(w[0]), 8'(w[1]), 8'(w[2]), 8'(w[3])};
    {x_n, x_n_1, x_n_2, x_n_3} = {8'(x[0]), 8'(x[1]), 8'(x[2]), 8'(x[3])};
    write = 1; read = 1;
    branch_address = 3'b001;         // dispatch sees this on the next edge
    begin
      int stores, last;
      stores = 0; last = -1;
      #1;
      for (int cyc = 0; cyc < 44; cyc++) begin
        if (YL) begin
          chk(int'(count) == stores, $sformatf("%s count=%0d at store %0d", tag, count, stores));
          chk(cyc == 7 + 6 * stores, $sformatf("%s store %0d in cycle %0d", tag, stores, cyc));
          stores++;
          last = cyc;
        end
        if (cyc == 43) branch_address = 3'b000;   // stop after this run
        @(posedge clk); #1;
      end
      chk(stores == 7 && last == 43, $sformatf("%s %0d stores, last in cycle %0d", tag, stores, last));
    end
    check_outs(exp, tag);
    chk(count == 3'd7, $sformatf("%s count=%0d after the run", tag, count));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned w [4], x [4], y [7], ref_y [7];
    reset = 1; read = 1; write = 1; branch_address = 3'b000;
    {w0, w1, w2, w3, x_n, x_n_1, x_n_2, x_n_3} = '0;
    repeat (2) @(posedge clk); #1;
    reset = 0; n_reset++;

    // Idle: nothing happens while branch_address is not 001.
    branch_address = 3'b010;
    repeat (5) @(posedge clk); #1;
    chk(controller_out1 == 0 && count == 0, "idle leaves results at reset value");

    // Reference cases.
    run_case('{1, 2, 2, 1}, '{1, 2, 3, 3},  '{1, 4, 9, 14, 14, 9, 3},      "case1");
    run_case('{3, 6, 6, 5}, '{2, 10, 3, 3}, '{6, 42, 81, 97, 86, 33, 15},  "case2");
    run_case('{5, 4, 4, 1}, '{3, 9, 7, 7},  '{15, 57, 83, 102, 65, 35, 7}, "case3");

    // The same results from the independent convolution model.
    conv('{5, 4, 4, 1}, '{3, 9, 7, 7}, ref_y);
    check_outs(ref_y, "case3 model");

    // Random cases, including full-scale values that wrap at 16 bits.
    for (int r = 0; r < 30; r++) begin
      for (int k = 0; k < 4; k++) begin
        w[k] = (r == 0) ? 255 : $urandom % 256;
        x[k] = (r == 0) ? 255 : $urandom % 256;
      end
      conv(w, x, y);
      run_case(w, x, y, $sformatf("random%0d", r));
    end
    ref_y = y;

    // write = 0: runs continue (new inputs) but stored results stay.
    write = 0;
    {w0, w1, w2, w3} = {8'd9, 8'd9, 8'd9, 8'd9};
    branch_address = 3'b001;
    repeat (100) @(posedge clk);
    branch_address = 3'b000;
    repeat (50) @(posedge clk); #1;
    check_outs(ref_y, "write=0 hold");

    // read = 0: outputs read zero, results still there afterwards.
    read = 0; #1;
    for (int i = 0; i < 7; i++) chk(outs(i) == 0, "read=0 gives zero");
    n_read_off++;
    read = 1; #1;
    check_outs(ref_y, "read again");

    // Reset clears the results.
    reset = 1; @(posedge clk); #1; reset = 0; n_reset++;
    for (int i = 0; i < 7; i++) chk(outs(i) == 0, "reset clears results");

    chk(n_le > 0,  "coefficient load (LE) happened");
    chk(n_ld1 > 0, "delay-line clear (LD1) happened");
    chk(n_ld0 > 0, "sample shift (LD0) happened");
    chk(n_dm > 0,  "zero padding (dm) happened");
    chk(n_cs > 0,  "clear-sum (CS) happened");
    chk(n_mac > 0, "multiply-accumulate (PS, Lacc) happened");
    chk(n_store > 0, "result store (YL) happened");
    chk(n_store_blocked > 0, "store blocked by write=0 happened");
    chk(n_idle > 0, "idle dispatch happened");
    chk(n_read_off > 0 && n_reset > 1, "read gating and reset happened");
    $display("mechanisms: LE=%0d LD1=%0d LD0=%0d dm=%0d CS=%0d MAC=%0d store=%0d blocked=%0d idle=%0d read_off=%0d reset=%0d",
             n_le, n_ld1, n_ld0, n_dm, n_cs, n_mac, n_store, n_store_blocked, n_idle, n_read_off, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
