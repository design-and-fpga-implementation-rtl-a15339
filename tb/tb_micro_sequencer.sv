// tb_micro_sequencer: random sequencing commands against a model of the
// next-address rule (increment, jump, dispatch on branch_address).
module tb_micro_sequencer;
  import fir_pkg::*;
  logic               clk = 0, rst;
  seq_t               seq;
  logic [UADDR_W-1:0] jump_addr, upc, model;
  logic [2:0]         branch_address;
  int checks = 0, failures = 0;
  int n_map_run = 0, n_map_idle = 0;

  micro_sequencer dut (.clk, .rst, .seq, .jump_addr, .branch_address, .upc);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; seq = SEQ_INC; jump_addr = 0; branch_address = 0;
    @(posedge clk); #1;
    checks++; if (upc !== 0) begin failures++; $display("FAIL reset upc=%0d", upc); end
    rst = 0; model = 0;
    for (int i = 0; i < 1000; i++) begin
      case ($urandom % 3)
        0: seq = SEQ_INC;
        1: seq = SEQ_JUMP;
        default: seq = SEQ_MAP;
      endcase
      jump_addr = UADDR_W'($urandom);
      branch_address = ($urandom % 2) ? 3'b001 : 3'($urandom);
      @(posedge clk);
      case (seq)
        SEQ_INC:  model = model + 1;
        SEQ_JUMP: model = jump_addr;
        default: begin
          model = (branch_address == 3'b001) ? 1 : 0;
          if (branch_address == 3'b001) n_map_run++; else n_map_idle++;
        end
      endcase
      #1;
      checks++;
      if (upc !== model) begin failures++; $display("FAIL upc=%0d exp=%0d", upc, model); end
    end
    checks++;
    if (n_map_run == 0 || n_map_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
