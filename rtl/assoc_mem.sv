// assoc_mem: associative memory built from NNET Hopfield networks in parallel.
//
// A single network of N neurons stores only about 0.18*N words (doubled to
// 0.36*N by the automatic storage of complements), far fewer than a code needs.
// Instead of one large network, the code words are spread over NNET networks of
// N neurons each. A received word is given to all networks at once; each one
// settles into one of its stable states and reports that state's energy and the
// energy it fell on the way. hop_select then takes the result of lowest energy,
// and of lowest energy difference among equals.
//
// Learning: `learn` with `learn_net` = n adds `learn_pat` to network n only;
// `clear` zeroes every network. Which word goes to which network is decided by
// the learning sequencer.
//
// Timing: `start` is accepted when `busy` is low. The result is taken when the
// slowest network has finished: `done` pulses one cycle after the last network's
// `done`: with `start` sampled at edge 0 it is high after edge max_n(k_n) + 2,
// where k_n is the number of updates network n needed. `word` and `sel` are held until the next result.
module assoc_mem #(
  parameter int unsigned N        = 19,       // neurons per network = word bits
  parameter int unsigned NNET     = 10,       // parallel networks
  parameter int unsigned WW       = 4,        // signed weight width
  parameter int unsigned MAX_ITER = 16,       // update limit per recall
  parameter int          THETA    = 0,        // neuron threshold
  localparam int unsigned SW      = (NNET > 1) ? $clog2(NNET) : 1,
  localparam int unsigned HW      = WW + $clog2(N) + 1,
  localparam int unsigned EW      = HW + $clog2(N) + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          learn,
  input  logic [SW-1:0] learn_net,
  input  logic [N-1:0]  learn_pat,
  input  logic          start,
  input  logic [N-1:0]  x_in,
  output logic          busy,
  output logic          done,
  output logic [N-1:0]  word,
  output logic [SW-1:0] sel
);

  logic        [N-1:0]  nx   [NNET];
  logic signed [EW-1:0] ne   [NNET];
  logic signed [EW-1:0] nde  [NNET];
  logic        [NNET-1:0] nvalid;
  logic                 go;

  assign go = start && !busy;

  for (genvar n = 0; n < NNET; n++) begin : g_net
    hop_net #(.N(N), .WW(WW), .MAX_ITER(MAX_ITER), .THETA(THETA)) u_net (
      .clk, .rst_n,
      .clear(clear && !busy), .learn(learn && !busy && (learn_net == SW'(n))), .learn_pat,
      .start(go), .x_in,
      .busy(), .done(), .valid(nvalid[n]),
      .x_out(nx[n]), .e_out(ne[n]), .de_out(nde[n]), .converged(), .iters()
    );
  end

  logic [SW-1:0] s_sel;
  logic [N-1:0]  s_word;
  hop_select #(.NNET(NNET), .N(N), .EW(EW)) u_sel (
    .x(nx), .e(ne), .de(nde), .sel(s_sel), .word(s_word)
  );

  // busy from the accepted start until the selected result is registered
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      word <= '0;
      sel  <= '0;
    end else begin
      done <= 1'b0;
      if (go) begin
        busy <= 1'b1;
      end else if (busy && (&nvalid)) begin
        busy <= 1'b0;
        done <= 1'b1;
        word <= s_word;
        sel  <= s_sel;
      end
    end
  end

endmodule
