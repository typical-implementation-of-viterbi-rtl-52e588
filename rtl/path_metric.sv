// path_metric: branch metrics of one trellis state.
//
// For a state and a received pair it gives the Hamming distance of the pair
// to the code pair of the state's input-0 branch (m1) and of its input-1
// branch (m2). The main machine uses one of these for W1/W2, and each sub
// machine one for its NS1/NS2 metrics. In this code the two branches leaving
// a state always carry complementary pairs, so m1 + m2 = 2: an error-free pair
// gives 0/2, one flipped bit gives a tie 1/1. Hamming distance is this
// design's reading of the source's "path metric", and agrees with the W1/W2
// values of its simulation.
//
// Purely combinational.
module path_metric
  import viterbi_pkg::*;
(
  input  state_t  state,
  input  pair_t   pair,
  output metric_t m1,
  output metric_t m2
);

  always_comb begin
    m1 = hamming(pair, branch_out(state, 1'b0));
    m2 = hamming(pair, branch_out(state, 1'b1));
  end

endmodule
