// main_machine: the four-state decoding machine.
//
// Its state is the decoder's estimate of the encoder state (A..D). Each step
// it takes the older received pair (temp2), computes W1 = distance to the
// input-0 branch and W2 = distance to the input-1 branch of its present
// state, and moves:
//   W1 < W2 : along the input-0 branch, decoded bit 0
//   W1 > W2 : along the input-1 branch, decoded bit 1
//   W1 = W2 : along the branch the minimum path tracer selects (PT = 0 gives
//             the input-0 branch, PT = 1 the input-1 branch).
// The decoded bit is the low bit of the new state. These rules are the
// source's next-state table. 'test' marks the tie, when the sub machines'
// look-ahead decides. 'err_detect' is raised with a decoded bit whose pair
// did not match the chosen branch exactly, i.e. a channel error was seen and
// corrected; that flag, the enable and the output registers are this
// design's choices.
//
// Timing: w1, w2 and test are combinational from state and pair. On an edge
// with step = 1 the state advances and out_bit, err_detect, tie_used and
// out_valid are written; out_valid is high for the one cycle after a step.
module main_machine
  import viterbi_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    step,
  input  pair_t   pair,
  input  logic    pt,
  output state_t  state,
  output metric_t w1,
  output metric_t w2,
  output logic    test,
  output logic    out_bit,
  output logic    out_valid,
  output logic    err_detect,
  output logic    tie_used
);

  logic    dec;
  metric_t w_sel;

  path_metric u_pm (
    .state (state),
    .pair  (pair),
    .m1    (w1),
    .m2    (w2)
  );

  always_comb begin
    test = (w1 == w2);
    if (test) dec = pt;
    else      dec = (w2 < w1);
    w_sel = dec ? w2 : w1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= ST_A;
      out_bit    <= 1'b0;
      out_valid  <= 1'b0;
      err_detect <= 1'b0;
      tie_used   <= 1'b0;
    end else begin
      out_valid <= step;
      if (step) begin
        state      <= next_state(state, dec);
        out_bit    <= dec;
        err_detect <= (w_sel != '0);
        tie_used   <= test;
      end
    end
  end

endmodule
