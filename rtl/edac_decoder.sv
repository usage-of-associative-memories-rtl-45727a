// edac_decoder: receiving side of the error detection and correction system.
//
// Two stages. The associative memory (assoc_mem, NNET Hopfield networks in
// parallel) takes the received word, which may carry errors, and returns the
// stored word it settles on; this is where errors are corrected. The second stage
// turns the recalled word back into a letter: the word goes to one copy of the
// word-code-to-letter table and its inverse to a second copy, and letter_select
// combines the two "found" answers into the letter (LSB 0 for a direct hit, 1 for
// a hit on the inverse) or into a detected-error flag when neither table knows the
// word.
//
// Timing: `start` is accepted while `busy` is low; the learning bus is passed to
// the associative memory. The table stage works on the recalled word in the
// cycle the associative memory reports `done`, and `done` pulses one cycle later
// (high after edge k + 3 when `start` is sampled at edge 0, k being the
// most updates any network needed), with all outputs registered and held until
// the next result. Registering the second stage is this design's choice.
module edac_decoder #(
  parameter int unsigned N        = 19,       // code word bits
  parameter int unsigned NNET     = 10,       // parallel networks
  parameter int unsigned NLETTERS = 64,       // alphabet size
  parameter int unsigned WW       = 4,        // signed weight width
  parameter int unsigned MAX_ITER = 16,       // update limit per recall
  parameter int          THETA    = 0,        // neuron threshold
  localparam int unsigned SW      = (NNET > 1) ? $clog2(NNET) : 1,
  localparam int unsigned LB      = $clog2(NLETTERS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          learn,
  input  logic [SW-1:0] learn_net,
  input  logic [N-1:0]  learn_pat,
  input  logic          start,
  input  logic [N-1:0]  word_in,
  output logic          busy,
  output logic          done,
  output logic [LB-1:0] letter,
  output logic          found,
  output logic          error,
  output logic          corrected,
  output logic [N-1:0]  word_out,
  output logic [SW-1:0] sel
);

  localparam int unsigned NWORDS = NLETTERS / 2;
  localparam int unsigned XW     = LB - 1;

  logic          am_busy, am_done;
  logic [N-1:0]  am_word;
  logic [SW-1:0] am_sel;
  logic [N-1:0]  rx_word;           // received word, kept for the corrected flag

  assoc_mem #(.N(N), .NNET(NNET), .WW(WW), .MAX_ITER(MAX_ITER), .THETA(THETA)) u_am (
    .clk, .rst_n, .clear, .learn, .learn_net, .learn_pat,
    .start(start && !busy), .x_in(word_in),
    .busy(am_busy), .done(am_done), .word(am_word), .sel(am_sel)
  );

  logic          fd, fi;
  logic [XW-1:0] xd, xi;
  code_lookup #(.N(N), .NWORDS(NWORDS)) u_tab_d (.word(am_word),  .found(fd), .index(xd));
  code_lookup #(.N(N), .NWORDS(NWORDS)) u_tab_i (.word(~am_word), .found(fi), .index(xi));

  logic [LB-1:0] l_letter;
  logic          l_found, l_error;
  letter_select #(.IW(XW)) u_lsel (
    .found_d(fd), .idx_d(xd), .found_i(fi), .idx_i(xi),
    .letter(l_letter), .found(l_found), .error(l_error)
  );

  assign busy = am_busy || am_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_word   <= '0;
      done      <= 1'b0;
      letter    <= '0;
      found     <= 1'b0;
      error     <= 1'b0;
      corrected <= 1'b0;
      word_out  <= '0;
      sel       <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) rx_word <= word_in;
      if (am_done) begin
        done      <= 1'b1;
        letter    <= l_letter;
        found     <= l_found;
        error     <= l_error;
        corrected <= (am_word != rx_word);
        word_out  <= am_word;
        sel       <= am_sel;
      end
    end
  end

endmodule
