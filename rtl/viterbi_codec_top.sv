// viterbi_codec_top: encoder, channel and decoder of the rate-1/2 link.
//
// A message bit is taken once per pair period (msg_ready high in the cycle
// whose closing edge loads it). The convolutional encoder turns it into the
// pair {a1, a0}, which is sent over a one-bit channel, a0 in the first bit
// slot and a1 in the second. The channel flips the bit in any cycle where
// 'noise' is high; the decoder receives the result and returns the message.
// The encoder/decoder chain is the source's system; the serial channel and
// the noise input are this design's model of it.
//
// Timing: counting cycles from 0 after reset, message bit j is loaded at the
// end of cycle 2*j + 1, its pair is on the channel in cycles 2*j + 2 (a0) and
// 2*j + 3 (a1), and its decoded bit appears with out_valid in cycle 2*j + 8,
// once the next message bit's pair has arrived. tx_bit and rx_bit are
// meaningful from cycle 2 on. The decoder's observation outputs (pairs,
// metrics, PT) are left unconnected here on purpose; they are for probing the
// decoder on its own.
module viterbi_codec_top
  import viterbi_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   msg_bit,
  output logic   msg_ready,
  input  logic   noise,
  output logic   tx_bit,
  output logic   rx_bit,
  output logic   out_bit,
  output logic   out_valid,
  output state_t dec_state,
  output logic   test,
  output logic   err_detect,
  output logic   tie_used,
  output state_t enc_state
);

  logic   phase, pair_tick;
  logic   a0, a1;

  logic   sending;

  clkgen u_tx_clkgen (
    .clk       (clk),
    .rst_n     (rst_n),
    .bit_valid (1'b1),
    .phase     (phase),
    .pair_tick (pair_tick)
  );

  assign msg_ready = pair_tick;

  conv_encoder u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (pair_tick),
    .din        (msg_bit),
    .a0         (a0),
    .a1         (a1),
    .state      (enc_state),
    .state_next ()
  );

  // The channel carries bits from the first loaded message bit on; the
  // encoder's reset content is never sent.
  always_ff @(posedge clk) begin
    if (!rst_n)         sending <= 1'b0;
    else if (pair_tick) sending <= 1'b1;
  end

  // Pair serialiser and channel.
  assign tx_bit = phase ? a1 : a0;
  assign rx_bit = tx_bit ^ noise;

  viterbi_decoder u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .rx_valid   (sending),
    .rx_bit     (rx_bit),
    .out_bit    (out_bit),
    .out_valid  (out_valid),
    .state      (dec_state),
    .test       (test),
    .err_detect (err_detect),
    .tie_used   (tie_used),
    .temp1      (),
    .temp2      (),
    .w1         (),
    .w2         (),
    .r1         (),
    .r2         (),
    .r3         (),
    .r4         (),
    .pt         ()
  );

endmodule
