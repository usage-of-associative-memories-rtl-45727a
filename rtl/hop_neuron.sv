// hop_neuron: one neuron of a Hopfield network.
//
// The neuron is an adder that gathers the weights of its connections and a
// threshold. With the state bits read as bipolar values (1 -> +1, 0 -> -1) it
// forms h = sum_{j != I} s_j * w_row[j], adding w_row[j] where s_j = 1 and
// subtracting it where s_j = 0, and its next state is y = 1 if h > THETA and 0
// (bipolar -1) otherwise, exactly as the threshold rule reads: a sum equal to the
// threshold gives 0. The value THETA = 0 is this design's choice.
//
// Purely combinational. `h` is also used outside the neuron to form the energy.
module hop_neuron #(
  parameter int unsigned N     = 19,          // neurons in the network
  parameter int unsigned I     = 0,           // index of this neuron
  parameter int unsigned WW    = 4,           // signed weight width
  parameter int          THETA = 0,           // threshold
  localparam int unsigned HW   = WW + $clog2(N) + 1
) (
  input  logic signed [WW-1:0] w_row [N],     // weights to every neuron; entry I unused
  input  logic        [N-1:0]  s,             // current state of the network
  output logic signed [HW-1:0] h,             // weighted sum
  output logic                 y              // next state of this neuron
);

  function automatic logic signed [HW-1:0] weighted_sum(input logic signed [WW-1:0] w [N],
                                                         input logic [N-1:0] sv);
    logic signed [HW-1:0] acc = '0;
    for (int j = 0; j < N; j++) begin
      if (j != I) begin
        if (sv[j]) acc = acc + HW'(w[j]);
        else       acc = acc - HW'(w[j]);
      end
    end
    return acc;
  endfunction

  assign h = weighted_sum(w_row, s);
  assign y = (h > HW'(THETA));

endmodule
