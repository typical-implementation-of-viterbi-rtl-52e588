// pair_register: serial-to-pair input register of the decoder.
//
// Received channel bits arrive at most one per fast clock cycle, qualified
// by rx_valid, a0 first, then a1.
// The first bit of a pair is held for one cycle; when the second arrives
// (phase = 1) the completed pair {a1, a0} is written to temp1 and the pair
// that was in temp1 moves to temp2. temp1 is therefore the newest pair (the
// sub machines look ahead with it) and temp2 the one before (the main machine
// decodes it). The two-stage temp1/temp2 structure and the names follow the
// source; the bit order, the valid flags and the reset are this design's
// choices.
//
// Timing: temp1/temp2 change on the edge that closes a cycle with
// rx_valid = 1 and phase = 1. The
// valid flags rise once one resp. two pairs have been received.
module pair_register
  import viterbi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  phase,
  input  logic  rx_valid,
  input  logic  rx_bit,
  output pair_t temp1,
  output pair_t temp2,
  output logic  temp1_valid,
  output logic  temp2_valid
);

  logic first_bit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      first_bit   <= 1'b0;
      temp1       <= '0;
      temp2       <= '0;
      temp1_valid <= 1'b0;
      temp2_valid <= 1'b0;
    end else if (rx_valid && !phase) begin
      first_bit <= rx_bit;
    end else if (rx_valid) begin
      temp1       <= {rx_bit, first_bit};
      temp2       <= temp1;
      temp1_valid <= 1'b1;
      temp2_valid <= temp1_valid;
    end
  end

endmodule
