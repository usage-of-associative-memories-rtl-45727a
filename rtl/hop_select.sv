// hop_select: picks one result out of the parallel Hopfield networks.
//
// Each network offers its final word, the energy of that word (E_min) and the
// energy it fell during recall (dE_min). The network with the lowest energy wins;
// among networks with equal energy the one with the lowest energy difference wins.
// These two criteria, in this order, are the design's selection rule. A tie in
// both is settled for the lowest network number, which is this design's choice.
//
// Purely combinational: `sel` and `word` follow the inputs in the same cycle.
module hop_select #(
  parameter int unsigned NNET = 10,           // parallel networks
  parameter int unsigned N    = 19,           // word width
  parameter int unsigned EW   = 17,           // energy width (signed)
  localparam int unsigned SW  = (NNET > 1) ? $clog2(NNET) : 1
) (
  input  logic        [N-1:0]  x  [NNET],
  input  logic signed [EW-1:0] e  [NNET],
  input  logic signed [EW-1:0] de [NNET],
  output logic        [SW-1:0] sel,
  output logic        [N-1:0]  word
);

  always_comb begin
    logic signed [EW-1:0] be, bde;
    sel = '0;
    be  = e[0];
    bde = de[0];
    for (int n = 1; n < NNET; n++) begin
      if ((e[n] < be) || ((e[n] == be) && (de[n] < bde))) begin
        sel = SW'(n);
        be  = e[n];
        bde = de[n];
      end
    end
    word = x[sel];
  end

endmodule
