// tb_hopfield_edac_32: the two 32-letter configurations of the system, run end
// to end side by side: 16-bit words in 6 networks of 16 neurons, and 23-bit
// words in 4 networks of 23 neurons. Every output is checked against the
// reference model and the share of letters recovered is printed per number of
// channel errors.
module tb_hopfield_edac_32;
  logic clk = 0;
  logic fin16, fin23;
  int c16, f16, c23, f23, d16, d23;

  always #5 clk = ~clk;

  edac_e2e_harness #(.N(16), .NNET(6), .NL(32)) h16 (.clk, .fin(fin16), .checks(c16), .failures(f16), .n_det(d16));
  edac_e2e_harness #(.N(23), .NNET(4), .NL(32)) h23 (.clk, .fin(fin23), .checks(c23), .failures(f23), .n_det(d23));

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c23, f16 + f23 + 1);
    $finish;
  end

  initial begin
    wait (fin16 && fin23);
    // a detected (uncorrected) error must occur in at least one configuration
    $display("detected errors: %0d with 16-bit words, %0d with 23-bit words", d16, d23);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c23 + 1, f16 + f23 + ((d16 + d23 == 0) ? 1 : 0));
    $finish;
  end
endmodule
