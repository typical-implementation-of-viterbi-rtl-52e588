// viterbi_decoder: look-ahead decoder for the rate-1/2 convolutional code.
//
// Instead of keeping path metrics for all four states and tracing back, this
// decoder follows a single path. A main machine steps once per received pair
// and takes the branch whose code pair is closer to what was received. A
// single flipped bit leaves both branches equally close; for that case two
// sub machines, clocked twice as fast, have already followed each branch one
// pair further with the next received pair, and a minimum path identifier
// tells the main machine which branch leads on more cheaply. An isolated bit
// error (no error in the following pair) is always corrected this way. The
// machine structure follows the source's block diagram; the clocking by
// enable is this design's choice (see clkgen).
//
// Interface: rx_bit is taken in cycles with rx_valid = 1, a0 then a1 of each
// pair; at most one bit per clock. out_bit is valid in the cycle out_valid is
// high, once per pair.
// Timing: when pair k+1 is complete, the sub machines capture one cycle later
// and the main machine decides pair k the cycle after; out_valid is high in
// the cycle after that. With one bit per clock starting in cycle 0, pair k+1
// completes at the end of cycle 2*k + 3 and the bit of pair k comes out in
// cycle 2*k + 6. Decoding the last pair of a message needs one more pair
// after it on the channel.
module viterbi_decoder
  import viterbi_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rx_valid,
  input  logic   rx_bit,
  output logic   out_bit,
  output logic   out_valid,
  output state_t state,
  output logic   test,
  output logic   err_detect,
  output logic   tie_used,
  // Observation of the internal metrics, named as in the source's waveforms.
  output pair_t   temp1,
  output pair_t   temp2,
  output metric_t w1,
  output metric_t w2,
  output metric_t r1,
  output metric_t r2,
  output metric_t r3,
  output metric_t r4,
  output logic    pt
);

  logic    phase, pair_tick;
  logic    temp1_valid, temp2_valid;
  metric_t min1, min2;
  state_t  sub1_state, sub2_state;
  logic    sub_load, main_step;

  clkgen u_clkgen (
    .clk       (clk),
    .rst_n     (rst_n),
    .bit_valid (rx_valid),
    .phase     (phase),
    .pair_tick (pair_tick)
  );

  pair_register u_reg (
    .clk         (clk),
    .rst_n       (rst_n),
    .phase       (phase),
    .rx_valid    (rx_valid),
    .rx_bit      (rx_bit),
    .temp1       (temp1),
    .temp2       (temp2),
    .temp1_valid (temp1_valid),
    .temp2_valid (temp2_valid)
  );

  // Once a new pair has made temp1 and temp2 both valid, the sub machines
  // capture in the next cycle (the mid-period edge of the double-rate clock)
  // and the main machine steps in the cycle after (the end-of-period edge).
  // Pairs complete at least two cycles apart, so the two never overlap.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sub_load  <= 1'b0;
      main_step <= 1'b0;
    end else begin
      sub_load  <= pair_tick & temp1_valid;
      main_step <= sub_load;
    end
  end

  sub_machine #(.BRANCH(1'b0)) u_sub1 (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (sub_load),
    .main_state (state),
    .pair       (temp1),
    .sub_state  (sub1_state),
    .r_a        (r1),
    .r_b        (r2),
    .min_metric (min1)
  );

  sub_machine #(.BRANCH(1'b1)) u_sub2 (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (sub_load),
    .main_state (state),
    .pair       (temp1),
    .sub_state  (sub2_state),
    .r_a        (r3),
    .r_b        (r4),
    .min_metric (min2)
  );

  min_path_identifier u_mpi (
    .min1       (min1),
    .min2       (min2),
    .pt         (pt)
  );

  main_machine u_main (
    .clk        (clk),
    .rst_n      (rst_n),
    .step       (main_step),
    .pair       (temp2),
    .pt         (pt),
    .state      (state),
    .w1         (w1),
    .w2         (w2),
    .test       (test),
    .out_bit    (out_bit),
    .out_valid  (out_valid),
    .err_detect (err_detect),
    .tie_used   (tie_used)
  );

  // The sub machines must have followed the main machine's present state.
  property p_sub_track;
    @(posedge clk) disable iff (!rst_n)
      main_step |-> (sub1_state == next_state(state, 1'b0)) &&
                    (sub2_state == next_state(state, 1'b1));
  endproperty
  a_sub_track: assert property (p_sub_track);

  // The main machine only steps on a pair that has been received.
  a_step_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 main_step |-> temp2_valid);

endmodule
