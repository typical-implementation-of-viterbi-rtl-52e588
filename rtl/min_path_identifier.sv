// min_path_identifier: the minimum path tracer between the two sub machines.
//
// Sub machine 1 follows the input-0 branch of the main machine's state, sub
// machine 2 the input-1 branch; each reports the smallest metric it can reach
// with the next pair. PT = 1 when sub machine 2's metric is strictly smaller,
// so the main machine takes the input-1 branch; otherwise PT = 0. Equal
// minima would leave PT = 0 (this design's choice), but they cannot occur
// with this code: the two sub machine states are always A and B, or C and D,
// and for every received pair exactly one of the two has a branch at
// distance 0 while the other's best is 1.
//
// Purely combinational.
module min_path_identifier
  import viterbi_pkg::*;
(
  input  metric_t min1,
  input  metric_t min2,
  output logic    pt
);

  always_comb pt = (min2 < min1);

endmodule
