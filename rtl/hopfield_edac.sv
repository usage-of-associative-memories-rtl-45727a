// hopfield_edac: error detection and correction with Hopfield associative memory.
//
// A 64-letter alphabet is sent over a noisy channel as 19-bit code words whose
// pairwise Hamming distance is at least 7. The encoder is a table: the letter's
// upper bits pick a code word and its LSB says whether to send the word or its
// inverse. The decoder is an associative memory made of 10 Hopfield networks of
// 19 neurons working in parallel: each network has learnt a few code words (and,
// through the bipolar Hebb rule, their inverses), a received word makes every
// network settle into a low-energy state, and the result of lowest energy is
// taken. Two word-code-to-letter tables, one fed with the recalled word and one
// with its inverse, turn it back into a letter, or flag a detected error when the
// recalled word is no code word.
//
// The encoder output `enc_word` and the decoder input `dec_word` are separate
// ports: the channel sits between them, outside this module.
//
// Sizes follow the 64-letter configuration (N = 19, NNET = 10); N = 16 with
// NLETTERS = 32 and NNET = 6, or N = 23 with NLETTERS = 32 and NNET = 4, give the
// two 32-letter configurations. The code word table, the placement of words in
// networks, THETA and MAX_ITER are this design's choices.
//
// Timing: after reset the learning sequencer needs NLETTERS/2 + 1 cycles; `ready`
// then rises. The encoder is combinational. The decoder accepts `dec_start` when
// `ready` is high and `dec_busy` low; with `dec_start` sampled at clock edge 0,
// `dec_done` is high after edge k + 3, k being the most state updates any
// network needed (at most MAX_ITER).
module hopfield_edac #(
  parameter int unsigned N        = 19,       // code word bits = neurons per network
  parameter int unsigned NNET     = 10,       // parallel Hopfield networks
  parameter int unsigned NLETTERS = 64,       // alphabet size
  parameter int unsigned MAX_ITER = 16,       // update limit per recall
  parameter int          THETA    = 0,        // neuron threshold
  localparam int unsigned SW      = (NNET > 1) ? $clog2(NNET) : 1,
  localparam int unsigned LB      = $clog2(NLETTERS)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          ready,
  // encoder
  input  logic [LB-1:0] enc_letter,
  output logic [N-1:0]  enc_word,
  // decoder
  input  logic          dec_start,
  input  logic [N-1:0]  dec_word,
  output logic          dec_busy,
  output logic          dec_done,
  output logic [LB-1:0] dec_letter,
  output logic          dec_found,
  output logic          dec_error,
  output logic          dec_corrected,
  output logic [N-1:0]  dec_word_out,
  output logic [SW-1:0] dec_net
);
  import hop_pkg::*;

  localparam int unsigned NWORDS = NLETTERS / 2;
  localparam int unsigned WW     = weight_width(words_in_net(NWORDS, NNET, 0));

  code_encoder #(.N(N), .NLETTERS(NLETTERS)) u_enc (.letter(enc_letter), .word(enc_word));

  logic          l_clear, l_learn;
  logic [SW-1:0] l_net;
  logic [N-1:0]  l_pat;
  learn_ctrl #(.N(N), .NNET(NNET), .NWORDS(NWORDS)) u_learn (
    .clk, .rst_n, .clear(l_clear), .learn(l_learn), .learn_net(l_net), .learn_pat(l_pat),
    .ready
  );

  edac_decoder #(.N(N), .NNET(NNET), .NLETTERS(NLETTERS), .WW(WW),
                 .MAX_ITER(MAX_ITER), .THETA(THETA)) u_dec (
    .clk, .rst_n, .clear(l_clear), .learn(l_learn), .learn_net(l_net), .learn_pat(l_pat),
    .start(dec_start && ready), .word_in(dec_word),
    .busy(dec_busy), .done(dec_done), .letter(dec_letter), .found(dec_found),
    .error(dec_error), .corrected(dec_corrected), .word_out(dec_word_out), .sel(dec_net)
  );

endmodule
