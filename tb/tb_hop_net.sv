// tb_hop_net: one 19-neuron Hopfield network. Learns four code words on chip,
// then recalls stored words, their complements, words with 1 to 4 flipped bits
// and random words. Final state, energy, energy difference, convergence flag,
// update count and the done latency (k + 1 edges for k updates) are compared with
// the reference model. A second round clears the weights and learns other words.
module tb_hop_net;
  import hop_ref_pkg::*;
  localparam int N = 19, WW = 4, MAXIT = 16, TH = 0;
  localparam int EW = WW + $clog2(N) + 1 + $clog2(N) + 2;

  logic clk = 0, rst_n = 0, clear = 0, learn = 0, start = 0;
  logic [N-1:0] learn_pat = '0, x_in = '0, x_out;
  logic busy, done, valid, converged;
  logic signed [EW-1:0] e_out, de_out;
  logic [$clog2(MAXIT+1)-1:0] iters;
  int checks = 0, failures = 0, n_nonconv = 0, n_moved = 0;

  hop_net #(.N(N), .WW(WW), .MAX_ITER(MAXIT), .THETA(TH)) dut (.*);

  // 8-neuron network for the worked example: after learning 1111 0000 the input
  // 0000 1110 settles on the complement 0000 1111 (bits written MSB first).
  logic       s_learn = 0, s_start = 0, s_busy, s_done, s_valid, s_conv;
  logic [7:0] s_pat = '0, s_x = '0, s_out;
  logic signed [3+3+1+3+2-1:0] s_e, s_de;
  logic [4:0] s_iters;
  hop_net #(.N(8), .WW(3), .MAX_ITER(16), .THETA(0)) dut8 (
    .clk, .rst_n, .clear(1'b0), .learn(s_learn), .learn_pat(s_pat), .start(s_start), .x_in(s_x),
    .busy(s_busy), .done(s_done), .valid(s_valid), .x_out(s_out), .e_out(s_e), .de_out(s_de),
    .converged(s_conv), .iters(s_iters)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic learn_set(longint unsigned pats [64], int np);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int p = 0; p < np; p++) begin
      learn = 1; learn_pat = N'(pats[p]); @(negedge clk);
    end
    learn = 0;
  endtask

  task automatic recall_one(const ref wmat_t w, input longint unsigned x);
    longint unsigned xf; int e, de, it, lat; bit cv;
    recall(N, w, x, TH, MAXIT, xf, e, de, it, cv);
    @(negedge clk); x_in = N'(x); start = 1;
    @(posedge clk); #1 start = 0; lat = 0;
    while (!done) begin @(posedge clk); #1 lat++; end
    check("x_out", x_out, xf);
    check("e_out", e_out, e);
    check("de_out", de_out, de);
    check("iters", iters, it);
    check("converged", converged, cv);
    check("latency", lat, it + 1);
    check("valid", valid, 1);
    if (!cv) n_nonconv++;
    if (xf != x) n_moved++;
  endtask

  initial begin
    longint unsigned cw [64], pats [64];
    wmat_t w;
    lexicode(N, 32, 7, cw);
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); s_learn = 1; s_pat = 8'b1111_0000;
    @(negedge clk); s_learn = 0; s_x = 8'b0000_1110; s_start = 1;
    @(negedge clk); s_start = 0;
    while (!s_done) @(negedge clk);
    check("8-neuron example", s_out, 8'b0000_1111);
    check("8-neuron example converged", s_conv, 1);
    for (int round = 0; round < 2; round++) begin
      for (int p = 0; p < 4; p++) pats[p] = cw[round + 10 * p];
      hebb(N, 4, pats, w);
      learn_set(pats, 4);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (i < j) check("weight", dut.wmat[i][j], w[i][j]);
      for (int p = 0; p < 4; p++) begin
        recall_one(w, pats[p]);
        recall_one(w, pats[p] ^ ((64'd1 << N) - 1));
      end
      for (int t = 0; t < 150; t++) begin
        longint unsigned x;
        int nf;
        x = pats[t % 4];
        nf = 1 + (t % 4);
        for (int f = 0; f < nf; f++) x[$urandom_range(0, N - 1)] ^= 1'b1;
        recall_one(w, x);
      end
      for (int t = 0; t < 100; t++) recall_one(w, longint'($urandom) & ((64'd1 << N) - 1));
    end
    $display("recalls that moved: %0d, that hit the update limit: %0d", n_moved, n_nonconv);
    checks++;
    if (n_moved == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
