// tb_code_lookup: every code word must be found at its index; its complement,
// the word with one to three flipped bits and random words must not be found
// unless they equal a code word. Single flips are tried at every bit position.
module tb_code_lookup;
  import hop_ref_pkg::*;
  localparam int N = 19, NW = 32;
  logic [N-1:0] word;
  logic found;
  logic [4:0] index;
  int checks = 0, failures = 0;

  code_lookup #(.N(N), .NWORDS(NW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(longint unsigned w, const ref longint unsigned cw [64]);
    int exp_idx; bit exp_found;
    exp_idx = 0; exp_found = 0;
    for (int k = 0; k < NW; k++) if (w == cw[k]) begin exp_found = 1; exp_idx = k; end
    word = N'(w);
    #1;
    checks++;
    if (found != exp_found || (exp_found && int'(index) != exp_idx)) begin
      failures++;
      if (failures < 10) $display("word %h: found %0d index %0d", w, found, index);
    end
  endtask

  initial begin
    longint unsigned cw [64];
    lexicode(N, NW, 7, cw);
    for (int k = 0; k < NW; k++) begin
      probe(cw[k], cw);
      probe(cw[k] ^ ((64'd1 << N) - 1), cw);
      for (int b = 0; b < N; b++) probe(cw[k] ^ (64'd1 << b), cw);
      for (int f = 1; f <= 3; f++) probe(cw[k] ^ (64'd1 << $urandom_range(0, N - 1)) ^ (64'd1 << (f + 2)), cw);
    end
    for (int t = 0; t < 2000; t++) probe(longint'($urandom) & ((64'd1 << N) - 1), cw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
