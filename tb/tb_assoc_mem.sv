// tb_assoc_mem: ten 19-neuron networks learn the 32 code words round-robin
// through the learning bus; received words (code words and complements with 0 to
// 4 flipped bits, and random words) are recalled. The selected word and network
// and the latency (max updates + 2 edges) are compared with the reference model.
module tb_assoc_mem;
  import hop_ref_pkg::*;
  localparam int N = 19, NNET = 10, NW = 32, WW = 4, MAXIT = 16, TH = 0;

  logic clk = 0, rst_n = 0, clear = 0, learn = 0, start = 0, busy, done;
  logic [3:0] learn_net = '0, sel;
  logic [N-1:0] learn_pat = '0, x_in = '0, word;
  int checks = 0, failures = 0;
  int sel_seen [NNET];

  assoc_mem #(.N(N), .NNET(NNET), .WW(WW), .MAX_ITER(MAXIT), .THETA(TH)) dut (.*);
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

  task automatic recall_one(const ref wset_t ws, input longint unsigned x);
    longint unsigned xw; int s, kmax, nc, lat;
    am_recall(N, NNET, ws, x, TH, MAXIT, xw, s, kmax, nc);
    @(negedge clk); x_in = N'(x); start = 1;
    @(posedge clk); #1 start = 0; lat = 0;
    checks++;
    if (!busy) failures++;
    while (!done) begin @(posedge clk); #1 lat++; end
    check("word", word, xw);
    check("sel", sel, s);
    check("latency", lat, kmax + 2);
    sel_seen[s]++;
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
      x = cw[t % NW] ^ ((t % 3 == 1) ? ((64'd1 << N) - 1) : 0);
      for (int f = 0; f < (t % 5); f++) x[$urandom_range(0, N - 1)] ^= 1'b1;
      recall_one(ws, x);
    end
    for (int t = 0; t < 50; t++) recall_one(ws, longint'($urandom) & ((64'd1 << N) - 1));
    for (int n = 0; n < NNET; n++) $display("network %0d selected %0d times", n, sel_seen[n]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
