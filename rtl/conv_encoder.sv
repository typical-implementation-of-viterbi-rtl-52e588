// conv_encoder: rate-1/2 convolutional encoder with a 3-bit register.
//
// The register is the chain Din -> M3 -> M2 -> M1. On each enabled clock edge
// the new message bit is loaded into M3 and the older bits shift on. The two
// code bits are read from the register: a0 = M3 and a1 = M3 ^ M2 ^ M1. So a
// pair is valid from the cycle after its bit was loaded until the next load.
// M2 and M1 hold the two previous bits, which is the trellis state the pair
// leaves: {M1, M2} in the {older, newer} notation of viterbi_pkg (A = 00 ..
// D = 11). The register, the output equations and the state table follow the
// source; the clock enable and the clearing reset (start in state A) are
// this design's choices.
//
// Interface: en loads din; a0/a1 are the code bits of the last loaded bit;
// state is the trellis state before that bit (present state) and
// state_next the state after it (next state).
module conv_encoder
  import viterbi_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   din,
  output logic   a0,
  output logic   a1,
  output state_t state,
  output state_t state_next
);

  logic m3, m2, m1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m3 <= 1'b0;
      m2 <= 1'b0;
      m1 <= 1'b0;
    end else if (en) begin
      m3 <= din;
      m2 <= m3;
      m1 <= m2;
    end
  end

  assign a0         = m3;
  assign a1         = m3 ^ m2 ^ m1;
  assign state      = state_t'({m1, m2});
  assign state_next = state_t'({m2, m3});

endmodule
