// sub_machine: look-ahead unit of the decoder.
//
// The main machine cannot choose between its two branches when both have the
// same metric (one bit of the pair was flipped). A sub machine then follows
// one of those branches one pair further: sub machine 1 (BRANCH = 0) takes
// the state the input-0 branch reaches, sub machine 2 (BRANCH = 1) the one
// the input-1 branch reaches. From that state it computes the two metrics of
// the newest pair (NS1, NS2) and selects the smaller. The smaller a sub
// machine's minimum, the likelier its branch is the transmitted one.
//
// The sub machines run at twice the main machine's rate: they capture their
// state and metrics on the mid-period edge (load = 1 in the first bit slot),
// so the result is ready when the main machine decides at the end of the
// period. Look-ahead of one pair, the NS1/NS2 metric units and the mux follow
// the source's block diagram; the depth of one pair and the register timing
// are this design's reading of it.
//
// Interface: sub_state, r_a (NS1), r_b (NS2) and min_metric are registered
// and change on an edge where load = 1. Since NS1 + NS2 = 2 for this code,
// min_metric never exceeds 1 and its upper bit stays 0; it keeps the common
// metric width.
module sub_machine
  import viterbi_pkg::*;
#(
  parameter bit BRANCH = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  state_t  main_state,
  input  pair_t   pair,
  output state_t  sub_state,
  output metric_t r_a,
  output metric_t r_b,
  output metric_t min_metric
);

  state_t  hyp_state;
  metric_t ns1, ns2;

  assign hyp_state = next_state(main_state, BRANCH);

  path_metric u_ns (
    .state (hyp_state),
    .pair  (pair),
    .m1    (ns1),
    .m2    (ns2)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sub_state  <= ST_A;
      r_a        <= '0;
      r_b        <= '0;
      min_metric <= '0;
    end else if (load) begin
      sub_state  <= hyp_state;
      r_a        <= ns1;
      r_b        <= ns2;
      min_metric <= (ns2 < ns1) ? ns2 : ns1;
    end
  end

endmodule
