// tb_hop_weight: checks the weight counter against an integer count of Hebb
// steps (+1 for equal bits, -1 for different bits), including clear, idle cycles
// and saturation at both ends of a 3-bit range.
module tb_hop_weight;
  logic clk = 0, rst_n = 0, clear = 0, learn = 0, a = 0, b = 0;
  logic signed [2:0] w;
  int checks = 0, failures = 0, model = 0;

  hop_weight #(.WW(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 40) == 0);
      learn = ($urandom_range(0, 3) != 0);
      a = 1'($urandom); b = 1'($urandom);
      @(posedge clk); #1;
      if (clear) model = 0;
      else if (learn) model = (a == b) ? ((model < 3) ? model + 1 : 3) : ((model > -4) ? model - 1 : -4);
      checks++;
      if (int'(w) != model) begin
        failures++;
        if (failures < 10) $display("t=%0d w=%0d expected %0d", t, w, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
