// tb_hop_neuron: random weights and states into a 19-input neuron; checks the
// weighted sum and the threshold output against integer arithmetic, for
// thresholds 0 and 3 (the latter checks that a sum equal to THETA gives 0).
module tb_hop_neuron;
  localparam int N = 19, WW = 4;
  logic signed [WW-1:0] w_row [N];
  logic [N-1:0] s;
  logic signed [WW+$clog2(N):0] h0, h3;
  logic y0, y3;
  int checks = 0, failures = 0, ties = 0;

  hop_neuron #(.N(N), .I(5), .WW(WW), .THETA(0)) dut0 (.w_row, .s, .h(h0), .y(y0));
  hop_neuron #(.N(N), .I(5), .WW(WW), .THETA(3)) dut3 (.w_row, .s, .h(h3), .y(y3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int sum;
      logic signed [WW-1:0] wr [N];
      for (int j = 0; j < N; j++) wr[j] = WW'($urandom_range(0, 8) - 4);
      w_row = wr;
      sum = 0;
      s = N'($urandom);
      #1;
      for (int j = 0; j < N; j++) if (j != 5) sum += (s[j] ? 1 : -1) * int'(w_row[j]);
      if (sum == 0 || sum == 3) ties++;
      checks += 4;
      if (int'(h0) != sum) begin failures++; if (failures < 5) $display("h0=%0d sum=%0d s=%b", h0, sum, s); end
      if (int'(h3) != sum) failures++;
      if (y0 != (sum > 0)) failures++;
      if (y3 != (sum > 3)) failures++;
    end
    $display("sums equal to the threshold: %0d", ties);
    checks++;
    if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
