// tb_letter_select: all combinations of the two Found flags with random indices.
module tb_letter_select;
  localparam int IW = 5;
  logic found_d, found_i, found, error;
  logic [IW-1:0] idx_d, idx_i;
  logic [IW:0] letter;
  int checks = 0, failures = 0;

  letter_select #(.IW(IW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int exp_letter;
      found_d = (t % 4 == 1) || (t % 4 == 3);
      found_i = (t % 4 == 2) || (t % 4 == 3);
      idx_d = IW'($urandom); idx_i = IW'($urandom);
      #1;
      exp_letter = found_d ? 2 * int'(idx_d) : (found_i ? 2 * int'(idx_i) + 1 : 0);
      checks += 3;
      if (int'(letter) != exp_letter) failures++;
      if (found != (found_d || found_i)) failures++;
      if (error != !(found_d || found_i)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
