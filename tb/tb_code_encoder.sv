// tb_code_encoder: every letter of the 64-letter alphabet is encoded and compared
// with the greedy lexicographic code recomputed here (word for even letters, its
// complement for odd ones); also checks the distance property of the code.
module tb_code_encoder;
  import hop_ref_pkg::*;
  localparam int N = 19, NL = 64;
  logic [5:0] letter;
  logic [N-1:0] word;
  int checks = 0, failures = 0;

  code_encoder #(.N(N), .NLETTERS(NL)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned cw [64];
    logic [N-1:0] got [NL];
    lexicode(N, NL / 2, 7, cw);
    for (int l = 0; l < NL; l++) begin
      letter = 6'(l);
      #1;
      got[l] = word;
      checks++;
      if (longint'(word) != ((l % 2) ? (cw[l / 2] ^ ((64'd1 << N) - 1)) : cw[l / 2])) begin
        failures++;
        $display("letter %0d: word %h", l, word);
      end
    end
    for (int a = 0; a < NL; a++)
      for (int b = a + 1; b < NL; b++) begin
        checks++;
        if (popcount(longint'(got[a] ^ got[b])) < 7) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
