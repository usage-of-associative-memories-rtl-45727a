// edac_e2e_harness: end-to-end test of one hopfield_edac configuration, used by
// tb_hopfield_edac_32 to run the two 32-letter configurations side by side.
//
// Same procedure as the default-size test: learning time, every letter through
// the encoder, then TRIALS random letters per number of channel errors (0 to 4),
// every decoder output compared with the reference model, the share of letters
// recovered printed, and each mechanism (inverted letter, changed word, letter
// recovered after errors, direct hit, inverted hit, more than one network
// winning) required to occur. Detected errors are counted and returned in
// `n_det`; the caller decides whether they must occur, since a configuration
// whose networks always settle on some code word never reports one. `fin` rises
// with the final counts.
module edac_e2e_harness #(
  parameter int N      = 16,
  parameter int NNET   = 6,
  parameter int NL     = 32,
  parameter int TRIALS = 200
) (
  input  logic clk,
  output logic fin,
  output int   checks,
  output int   failures,
  output int   n_det
);
  import hop_ref_pkg::*;
  localparam int NW = NL / 2, MAXIT = 16, TH = 0;
  localparam int LB = $clog2(NL), SW = (NNET > 1) ? $clog2(NNET) : 1;

  logic rst_n = 0, ready, dec_start = 0, dec_busy, dec_done;
  logic dec_found, dec_error, dec_corrected;
  logic [LB-1:0] enc_letter = '0, dec_letter;
  logic [N-1:0] enc_word, dec_word = '0, dec_word_out;
  logic [SW-1:0] dec_net;
  int n_inv_sent = 0, n_changed = 0, n_recovered = 0, n_dir = 0, n_inv = 0;
  int ok_by_err [5], det_by_err [5];
  int net_won [NNET];

  hopfield_edac #(.N(N), .NNET(NNET), .NLETTERS(NL), .MAX_ITER(MAXIT), .THETA(TH)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("[%0d bits] %s: got %0d expected %0d", N, what, got, exp);
    end
  endtask

  initial begin
    longint unsigned cw [64];
    wset_t ws;
    int lat;
    fin = 0; checks = 0; failures = 0; n_det = 0;
    lexicode(N, NW, 7, cw);
    learn_all(N, NNET, NW, cw, ws);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    lat = 0;
    while (!ready) begin @(posedge clk); #1 lat++; end
    check("learning cycles", lat, NW + 1);
    for (int l = 0; l < NL; l++) begin
      enc_letter = LB'(l);
      #1;
      check("enc_word", enc_word, (l % 2) ? (cw[l / 2] ^ ((64'd1 << N) - 1)) : cw[l / 2]);
    end
    for (int ne = 0; ne <= 4; ne++) begin
      for (int t = 0; t < TRIALS; t++) begin
        int letter, l, s, kmax, nc;
        longint unsigned x, xw;
        bit f, inv;
        logic [N-1:0] flips;
        letter = $urandom_range(0, NL - 1);
        @(negedge clk);
        enc_letter = LB'(letter);
        #1;
        if (letter % 2) n_inv_sent++;
        flips = '0;
        while ($countones(flips) < ne) flips[$urandom_range(0, N - 1)] = 1'b1;
        x = longint'(enc_word ^ flips);
        am_recall(N, NNET, ws, x, TH, MAXIT, xw, s, kmax, nc);
        to_letter(N, NW, cw, xw, l, f, inv);
        @(negedge clk); dec_word = N'(x); dec_start = 1;
        @(posedge clk); #1 dec_start = 0; lat = 0;
        while (!dec_done) begin @(posedge clk); #1 lat++; end
        check("dec_word_out", dec_word_out, xw);
        check("dec_net", dec_net, s);
        check("dec_found", dec_found, f);
        check("dec_error", dec_error, !f);
        check("dec_letter", dec_letter, l);
        check("dec_corrected", dec_corrected, xw != x);
        check("latency", lat, kmax + 3);
        net_won[s]++;
        if (xw != x) n_changed++;
        if (!f) n_det++; else if (inv) n_inv++; else n_dir++;
        if (f && l == letter) begin
          ok_by_err[ne]++;
          if (ne > 0) n_recovered++;
        end
        if (!f) det_by_err[ne]++;
      end
    end
    begin
      int nets_used;
      nets_used = 0;
      for (int n = 0; n < NNET; n++) if (net_won[n] > 0) nets_used++;
      for (int ne = 0; ne <= 4; ne++)
        $display("[%0d bits, %0d networks] %0d channel errors: letter recovered %0d of %0d, error detected %0d",
                 N, NNET, ne, ok_by_err[ne], TRIALS, det_by_err[ne]);
      $display("[%0d bits] mechanisms: sent inverted %0d, word changed %0d, recovered after errors %0d, direct hits %0d, inverted hits %0d, detected errors %0d, networks that won %0d",
               N, n_inv_sent, n_changed, n_recovered, n_dir, n_inv, n_det, nets_used);
      checks += 6;
      if (n_inv_sent == 0) failures++;
      if (n_changed == 0) failures++;
      if (n_recovered == 0) failures++;
      if (n_dir == 0) failures++;
      if (n_inv == 0) failures++;
      if (nets_used < 2) failures++;
    end
    fin = 1;
  end
endmodule
