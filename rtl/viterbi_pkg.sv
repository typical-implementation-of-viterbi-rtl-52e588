// viterbi_pkg: types and functions shared by the rate-1/2 convolutional
// encoder and the look-ahead Viterbi decoder.
//
// The code has two memory bits. A trellis state is written {older, newer}:
// A = 00, B = 01, C = 10, D = 11, and an input bit u moves state {s1, s0} to
// {s0, u}, so the newest stored bit is the low bit of the state and the
// decoded bit is the low bit of the state a branch ends in. Each branch emits
// the pair {a1, a0} with a0 = u and a1 = u ^ s1 ^ s0. These are the rules of
// the encoder function table (Table 1 of the source) and of its state diagram.
// Metrics are 2-bit Hamming distances between a received pair and a branch
// output, which is all a pair can differ by.
package viterbi_pkg;

  localparam int unsigned METRIC_W = 2;

  typedef enum logic [1:0] {
    ST_A = 2'b00,
    ST_B = 2'b01,
    ST_C = 2'b10,
    ST_D = 2'b11
  } state_t;

  typedef logic [1:0]          pair_t;    // {a1, a0}
  typedef logic [METRIC_W-1:0] metric_t;

  // State reached from s on input bit u.
  function automatic state_t next_state(state_t s, logic u);
    return state_t'(2'((s << 1) | 2'(u)));
  endfunction

  // Code pair {a1, a0} emitted from state s on input bit u.
  function automatic pair_t branch_out(state_t s, logic u);
    return {u ^ s[1] ^ s[0], u};
  endfunction

  // Hamming distance of two pairs.
  function automatic metric_t hamming(pair_t x, pair_t y);
    pair_t d;
    d = x ^ y;
    return metric_t'(d[1]) + metric_t'(d[0]);
  endfunction

endpackage
