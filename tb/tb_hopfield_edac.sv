// tb_hopfield_edac: end-to-end test of the whole system at its default size
// (64 letters, 19-bit words, 10 networks of 19 neurons).
//
// After reset it checks that learning takes NLETTERS/2 + 1 cycles, encodes every
// letter, and then sends random letters through a channel model that flips 0 to
// 4 distinct random bits of the code word. Every decoder output (letter, found,
// error, corrected, recalled word, network, latency) is compared with the
// reference model. It counts how often each mechanism of the design occurred:
// a letter sent inverted, a word changed by the associative memory, a letter
// recovered from a corrupted word, hits in the direct and the inverted table,
// a detected (uncorrected) error, and how many different networks won the
// selection; a mechanism that never occurred counts as a failure. It also
// prints the share of letters recovered for each number of channel errors.
module tb_hopfield_edac;
  import hop_ref_pkg::*;
  localparam int N = 19, NNET = 10, NL = 64, NW = 32, MAXIT = 16, TH = 0;
  localparam int TRIALS = 400;        // decodes per number of channel errors

  logic clk = 0, rst_n = 0, ready, dec_start = 0, dec_busy, dec_done;
  logic dec_found, dec_error, dec_corrected;
  logic [5:0] enc_letter = '0, dec_letter;
  logic [N-1:0] enc_word, dec_word = '0, dec_word_out;
  logic [3:0] dec_net;
  int checks = 0, failures = 0;
  int n_inv_sent = 0, n_changed = 0, n_recovered = 0, n_dir = 0, n_inv = 0, n_det = 0;
  int ok_by_err [5], det_by_err [5];
  int net_won [NNET];

  hopfield_edac dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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

  initial begin
    longint unsigned cw [64];
    wset_t ws;
    int lat;
    lexicode(N, NW, 7, cw);
    learn_all(N, NNET, NW, cw, ws);

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    lat = 0;
    while (!ready) begin @(posedge clk); #1 lat++; end
    check("learning cycles", lat, NW + 1);

    // encoder, every letter
    for (int l = 0; l < NL; l++) begin
      enc_letter = 6'(l);
      #1;
      check("enc_word", enc_word, (l % 2) ? (cw[l / 2] ^ ((64'd1 << N) - 1)) : cw[l / 2]);
    end

    // through the channel and the decoder
    for (int ne = 0; ne <= 4; ne++) begin
      for (int t = 0; t < TRIALS; t++) begin
        int letter, l, s, kmax, nc;
        longint unsigned x, xw;
        bit f, inv;
        logic [N-1:0] flips;
        letter = $urandom_range(0, NL - 1);
        @(negedge clk);
        enc_letter = 6'(letter);
        #1;
        if (letter % 2) n_inv_sent++;
        flips = '0;
        while ($countones(flips) < ne) flips[$urandom_range(0, N - 1)] = 1'b1;
        x = longint'(enc_word ^ flips);                 // channel
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
        $display("%0d channel errors: letter recovered %0d of %0d, error detected %0d",
                 ne, ok_by_err[ne], TRIALS, det_by_err[ne]);
      $display("mechanisms: sent inverted %0d, word changed %0d, recovered after errors %0d, direct hits %0d, inverted hits %0d, detected errors %0d, networks that won %0d",
               n_inv_sent, n_changed, n_recovered, n_dir, n_inv, n_det, nets_used);
      checks += 7;
      if (n_inv_sent == 0) failures++;
      if (n_changed == 0) failures++;
      if (n_recovered == 0) failures++;
      if (n_dir == 0) failures++;
      if (n_inv == 0) failures++;
      if (n_det == 0) failures++;
      if (nets_used < 2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
