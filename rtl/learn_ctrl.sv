// learn_ctrl: learning sequencer for the parallel Hopfield networks.
//
// After reset it runs the learning stage once: one cycle of `clear` to zero every
// weight, then one `learn` strobe per code word, word k of hop_pkg::LEXICODE going
// to network k mod NNET. Only the NWORDS words of LSB-0 letters are learnt; their
// complements are stored automatically by the bipolar Hebb rule. When the last
// word has been presented `ready` rises and stays high. The round-robin placement
// and this sequencing are this design's choices.
//
// Timing: clear in the first cycle after reset, learn strobes in the next NWORDS
// cycles, `ready` from cycle NWORDS + 1 on.
module learn_ctrl #(
  parameter int unsigned N      = 19,         // code word bits
  parameter int unsigned NNET   = 10,         // parallel networks
  parameter int unsigned NWORDS = 32,         // code words to learn
  localparam int unsigned SW    = (NNET > 1) ? $clog2(NNET) : 1,
  localparam int unsigned KW    = $clog2(NWORDS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          clear,
  output logic          learn,
  output logic [SW-1:0] learn_net,
  output logic [N-1:0]  learn_pat,
  output logic          ready
);
  import hop_pkg::*;

  typedef enum logic [1:0] {CLEAR, LOAD, READY} state_t;
  state_t        st;
  logic [KW-1:0] k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= CLEAR;
      k         <= '0;
      learn_net <= '0;
    end else begin
      unique case (st)
        CLEAR: st <= LOAD;
        LOAD: begin
          k <= k + 1'b1;
          learn_net <= (learn_net == SW'(NNET - 1)) ? '0 : learn_net + 1'b1;
          if (k == KW'(NWORDS - 1)) st <= READY;
        end
        default: st <= READY;
      endcase
    end
  end

  always_comb begin
    clear     = (st == CLEAR);
    learn     = (st == LOAD);
    ready     = (st == READY);
    learn_pat = '0;
    for (int i = 0; i < NWORDS; i++)
      if (k == KW'(i)) learn_pat = LEXICODE[i][N-1:0];
  end

endmodule
