// tb_edac_decoder: the decoder with ten 19-neuron networks, learnt through its
// learning bus. For received words with 0 to 4 flipped bits (and random words)
// the letter, found, error and corrected flags, the recalled word, the network
// and the latency (max updates + 3 edges) are compared with the reference model.
module tb_edac_decoder;
  import hop_ref_pkg::*;
  localparam int N = 19, NNET = 10, NL = 64, NW = 32, WW = 4, MAXIT = 16, TH = 0;

  logic clk = 0, rst_n = 0, clear = 0, learn = 0, start = 0;
  logic [3:0] learn_net = '0, sel;
  logic [N-1:0] learn_pat = '0, word_in = '0, word_out;
  logic busy, done, found, error, corrected;
  logic [5:0] letter;
  int checks = 0, failures = 0, n_err = 0, n_inv = 0, n_dir = 0, n_corr = 0;

  edac_decoder #(.N(N), .NNET(NNET), .NLETTERS(NL), .WW(WW), .MAX_ITER(MAXIT), .THETA(TH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic decode_one(const ref wset_t ws, input longint unsigned x,
                            input longint unsigned cw [64]);
    longint unsigned xw; int s, kmax, nc, lat, l; bit f, inv;
    am_recall(N, NNET, ws, x, TH, MAXIT, xw, s, kmax, nc);
    to_letter(N, NW, cw, xw, l, f, inv);
    @(negedge clk); word_in = N'(x); start = 1;
    @(posedge clk); #1 start = 0; lat = 0;
    while (!done) begin @(posedge clk); #1 lat++; end
    check("word_out", word_out, xw);
    check("sel", sel, s);
    check("found", found, f);
    check("error", error, !f);
    check("letter", letter, l);
    check("corrected", corrected, xw != x);
    check("latency", lat, kmax + 3);
    if (!f) n_err++; else if (inv) n_inv++; else n_dir++;
    if (xw != x) n_corr++;
  endtask

  initial begin
    longint unsigned cw [64];
    wset_t ws;
    lexicode(N, NW, 7, cw);
    learn_all(N, NNET, NW, cw, ws);
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < NW; k++) begin
      learn = 1; learn_net = 4'(k % NNET); learn_pat = N'(cw[k]); @(negedge clk);
    end
    learn = 0;
    for (int t = 0; t < 300; t++) begin
      longint unsigned x;
      x = cw[(t / 2) % NW] ^ ((t % 2) ? ((64'd1 << N) - 1) : 0);
      for (int f = 0; f < (t % 5); f++) x[$urandom_range(0, N - 1)] ^= 1'b1;
      decode_one(ws, x, cw);
    end
    for (int t = 0; t < 50; t++) decode_one(ws, longint'($urandom) & ((64'd1 << N) - 1), cw);
    $display("direct hits %0d, inverted hits %0d, detected errors %0d, words changed %0d",
             n_dir, n_inv, n_err, n_corr);
    checks++;
    if (n_dir == 0 || n_inv == 0 || n_err == 0 || n_corr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
