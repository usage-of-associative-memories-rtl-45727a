// hop_weight: the weight circuit between two neurons of a Hopfield network.
//
// A Hopfield network with N neurons has N(N-1)/2 of these, one per pair (i, j);
// the same value serves as w_ij and w_ji. Learning follows Hebb's rule with the
// bipolar operator (0 o 0 = 1 o 1 = +1, 0 o 1 = 1 o 0 = -1): on each `learn`
// strobe the counter steps up when the two pattern bits `a` and `b` agree and
// down when they differ, so after P patterns it holds sum_k a_k o b_k. The
// up/down counter is how the weight is described; its width and the saturation
// at the ends of the signed range are this design's own choices (with WW sized
// for the patterns a network stores, saturation never happens).
//
// Timing: `clear` (priority) and `learn` act on the rising clock edge; `w` is the
// registered count. Reset (asynchronous, active low) clears the count.
module hop_weight #(
  parameter int unsigned WW = 4              // signed weight width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 learn,
  input  logic                 a,
  input  logic                 b,
  output logic signed [WW-1:0] w
);

  localparam logic signed [WW-1:0] WMAX = {1'b0, {(WW-1){1'b1}}};
  localparam logic signed [WW-1:0] WMIN = {1'b1, {(WW-1){1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      w <= '0;
    else if (clear)
      w <= '0;
    else if (learn) begin
      if (a ~^ b) begin
        if (w != WMAX) w <= w + 1'b1;
      end else begin
        if (w != WMIN) w <= w - 1'b1;
      end
    end
  end

endmodule
