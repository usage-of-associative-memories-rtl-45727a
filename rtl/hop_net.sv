// hop_net: a Hopfield network of N neurons with on-chip Hebbian learning and
// iterative recall.
//
// Structure. N hop_neuron adders and N(N-1)/2 hop_weight counters, one for every
// pair of neurons, shared symmetrically (w_ij = w_ji, w_ii = 0). Pattern bits are
// read as bipolar values: 1 is +1, 0 is -1.
//
// Learning. A `learn` strobe adds the pattern on `learn_pat` to every weight by
// Hebb's rule (+1 where the two bits agree, -1 where they differ); `clear` zeroes
// them. Because the rule is symmetric in the sign of the pattern, learning a word
// also stores its complement.
//
// Recall. `start` loads `x_in` into the state register. Then, once per clock, all
// neurons update together from the current state (synchronous update, X(t+1) from
// X(t)). Recall ends on the first cycle whose next state equals the current state
// (`converged` = 1) or after MAX_ITER updates (`converged` = 0). At that point the
// network reports:
//   x_out  the final state,
//   e_out  its energy, as 2E = -sum_i s_i h_i + THETA * sum_i s_i (bipolar s_i),
//          which is twice the Hopfield energy so that it stays an integer,
//   de_out 2 * (E(x_in) - E(final)), the energy fallen during recall,
//   iters  the number of state updates made.
// The two energies are the E_min and dE_min that the parallel-network selection
// uses. Reading dE_min as the fall from the input's energy, THETA = 0 and
// MAX_ITER = 16 are this design's choices.
//
// Timing. With `start` sampled at clock edge 0 and k updates needed, `done` is
// high for the one cycle after edge k+1 (one edge per update plus one to see the
// state is stable or the limit is reached); `valid` rises with it and the results
// are held until the next `start`. `busy` is high from edge 0 to edge k+1.
// `learn`, `clear` and `start` are only accepted while not busy.
module hop_net #(
  parameter int unsigned N        = 19,       // neurons (= code word bits)
  parameter int unsigned WW       = 4,        // signed weight width
  parameter int unsigned MAX_ITER = 16,       // update limit per recall
  parameter int          THETA    = 0,        // neuron threshold
  localparam int unsigned HW      = WW + $clog2(N) + 1,
  localparam int unsigned EW      = HW + $clog2(N) + 2,
  localparam int unsigned IW      = $clog2(MAX_ITER + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // learning
  input  logic                 clear,
  input  logic                 learn,
  input  logic        [N-1:0]  learn_pat,
  // recall
  input  logic                 start,
  input  logic        [N-1:0]  x_in,
  output logic                 busy,
  output logic                 done,
  output logic                 valid,
  output logic        [N-1:0]  x_out,
  output logic signed [EW-1:0] e_out,
  output logic signed [EW-1:0] de_out,
  output logic                 converged,
  output logic        [IW-1:0] iters
);

  // ---------------------------------------------------------------- weights
  // One counter per pair i < j, kept in a flat triangular array; the full
  // symmetric matrix seen by the neurons is wired from it.
  localparam int unsigned NW = N * (N - 1) / 2;

  function automatic int unsigned pair_idx(int unsigned i, int unsigned j);  // i < j
    return i * N - (i * (i + 1)) / 2 + (j - i - 1);
  endfunction

  logic signed [WW-1:0] wpair [NW];
  logic signed [WW-1:0] wmat  [N][N];
  logic                 wr_en, clr_en;
  assign wr_en  = learn && !busy;
  assign clr_en = clear && !busy;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      if (i < j) begin : g_w
        hop_weight #(.WW(WW)) u_w (
          .clk, .rst_n, .clear(clr_en), .learn(wr_en),
          .a(learn_pat[i]), .b(learn_pat[j]), .w(wpair[pair_idx(i, j)])
        );
        assign wmat[i][j] = wpair[pair_idx(i, j)];
      end else if (i > j) begin : g_sym
        assign wmat[i][j] = wpair[pair_idx(j, i)];
      end else begin : g_diag
        assign wmat[i][j] = '0;
      end
    end
  end

  // ---------------------------------------------------------------- neurons
  logic        [N-1:0]  s;          // state register
  logic        [N-1:0]  s_next;
  logic signed [HW-1:0] h [N];

  for (genvar i = 0; i < N; i++) begin : g_neuron
    hop_neuron #(.N(N), .I(i), .WW(WW), .THETA(THETA)) u_n (
      .w_row(wmat[i]), .s(s), .h(h[i]), .y(s_next[i])
    );
  end

  // ---------------------------------------------------------------- energy
  logic signed [EW-1:0] energy;     // 2E of the current state
  always_comb begin
    energy = '0;
    for (int i = 0; i < N; i++) begin
      if (s[i]) energy = energy - EW'(h[i]) + EW'(THETA);
      else      energy = energy + EW'(h[i]) - EW'(THETA);
    end
  end

  // ---------------------------------------------------------------- control
  typedef enum logic [1:0] {IDLE, FIRST, RUN} state_t;
  state_t               st;
  logic signed [EW-1:0] e_start;
  logic        [IW-1:0] cnt;
  logic                 stable, last;

  assign busy   = (st != IDLE);
  assign stable = (s_next == s);
  assign last   = stable || (cnt == IW'(MAX_ITER));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= IDLE;
      s         <= '0;
      e_start   <= '0;
      cnt       <= '0;
      done      <= 1'b0;
      valid     <= 1'b0;
      x_out     <= '0;
      e_out     <= '0;
      de_out    <= '0;
      converged <= 1'b0;
      iters     <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          s     <= x_in;
          cnt   <= '0;
          valid <= 1'b0;
          st    <= FIRST;
        end
        FIRST, RUN: begin
          if (st == FIRST) e_start <= energy;
          if (last) begin
            x_out     <= s;
            e_out     <= energy;
            de_out    <= ((st == FIRST) ? energy : e_start) - energy;
            converged <= stable;
            iters     <= cnt;
            done      <= 1'b1;
            valid     <= 1'b1;
            st        <= IDLE;
          end else begin
            s   <= s_next;
            cnt <= cnt + 1'b1;
            st  <= RUN;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("hop_net: start while busy");
  a_no_learn_when_busy: assert property (@(posedge clk) disable iff (!rst_n) !((learn || clear) && busy))
    else $error("hop_net: learn or clear while busy");

endmodule
