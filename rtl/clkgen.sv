// clkgen: pair-slot phase generator.
//
// The decoder works with two clock rates: the main machine takes one step
// per received code pair, while the pair register and the two sub machines
// work at twice that rate, one step per channel bit. Rather than derive a
// second clock in logic, the whole design runs on the fast (bit) clock and
// this block marks which of the two bit slots of a pair the current valid
// bit fills.
// The cycle with phase = 1 ends a pair; its closing edge stands for the
// main-machine clock edge, and the edge closing a phase = 0 cycle is the
// extra edge of the double-rate clock. That a main step is worth two fast
// steps follows the source; implementing it as an enable is this design's
// choice.
//
// Interface: phase starts at 0 after reset and toggles on every cycle with
// bit_valid = 1, so a stream may pause. pair_tick is high in the cycle whose
// valid bit completes a pair (phase = 1 and bit_valid = 1).
module clkgen (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_valid,
  output logic phase,
  output logic pair_tick
);

  always_ff @(posedge clk) begin
    if (!rst_n)         phase <= 1'b0;
    else if (bit_valid) phase <= ~phase;
  end

  assign pair_tick = phase & bit_valid;

endmodule
