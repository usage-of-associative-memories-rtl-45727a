// tb_learn_ctrl: after reset, one clear cycle, then one learn strobe per code
// word with word k going to network k mod NNET, then ready for good.
module tb_learn_ctrl;
  import hop_ref_pkg::*;
  localparam int N = 19, NNET = 10, NW = 32;
  logic clk = 0, rst_n = 0, clear, learn, ready;
  logic [3:0] learn_net;
  logic [N-1:0] learn_pat;
  int checks = 0, failures = 0;

  learn_ctrl #(.N(N), .NNET(NNET), .NWORDS(NW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %b", what, got); end
  endtask

  initial begin
    longint unsigned cw [64];
    lexicode(N, NW, 7, cw);
    repeat (3) @(posedge clk);
    #1;
    expect_bit("clear in reset", clear, 1);
    rst_n = 1;
    expect_bit("clear", clear, 1);
    expect_bit("learn", learn, 0);
    @(posedge clk); #1;
    for (int k = 0; k < NW; k++) begin
      expect_bit("learn", learn, 1);
      expect_bit("clear", clear, 0);
      expect_bit("ready", ready, 0);
      checks += 2;
      if (int'(learn_net) != k % NNET) failures++;
      if (longint'(learn_pat) != cw[k]) failures++;
      @(posedge clk); #1;
    end
    for (int t = 0; t < 20; t++) begin
      expect_bit("ready", ready, 1);
      expect_bit("learn", learn, 0);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
