// tb_hop_select: random energies and energy differences, drawn from small ranges
// so that ties in energy and in both criteria are frequent; the selected network
// and word are compared with a direct scan of the criteria.
module tb_hop_select;
  localparam int NNET = 10, N = 19, EW = 17;
  logic [N-1:0] x [NNET];
  logic signed [EW-1:0] e [NNET], de [NNET];
  logic [3:0] sel;
  logic [N-1:0] word;
  int checks = 0, failures = 0, ties_e = 0, ties_both = 0;

  hop_select #(.NNET(NNET), .N(N), .EW(EW)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int best;
      logic [N-1:0] xl [NNET];
      logic signed [EW-1:0] el [NNET], dl [NNET];
      for (int n = 0; n < NNET; n++) begin
        xl[n] = N'($urandom);
        el[n] = EW'(-200 + 2 * $urandom_range(0, 4));
        dl[n] = EW'(2 * $urandom_range(0, 3) - 2);
      end
      x = xl; e = el; de = dl;
      #1;
      best = 0;
      for (int n = 1; n < NNET; n++) begin
        if (int'(el[n]) < int'(el[best])) best = n;
        else if (int'(el[n]) == int'(el[best]) && int'(dl[n]) < int'(dl[best])) best = n;
      end
      for (int n = 0; n < NNET; n++) if (n != best && el[n] == el[best]) begin
        ties_e++;
        if (dl[n] == dl[best]) ties_both++;
      end
      checks += 2;
      if (int'(sel) != best) begin
        failures++;
        if (failures < 10) $display("t=%0d sel=%0d expected %0d", t, sel, best);
      end
      if (word != xl[best]) failures++;
    end
    $display("energy ties: %0d, full ties: %0d", ties_e, ties_both);
    checks++;
    if (ties_e == 0 || ties_both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
