// path_metric_tb: all 16 combinations of state and received pair against
// the Hamming distances to the branch pairs of the encoder function table,
// plus the metric values of the source's simulation (state A, pair 11 gives
// W1 = 2, W2 = 0; state B, pair 11 gives 1, 1; state C, pair 10 gives 0, 2).
module path_metric_tb;
  import viterbi_pkg::*;

  state_t  state;
  pair_t   pair;
  metric_t m1, m2;
  int checks = 0, failures = 0;

  localparam logic [1:0] OUT [4][2] = '{'{2'b00, 2'b11}, '{2'b10, 2'b01}, '{2'b10, 2'b01}, '{2'b00, 2'b11}};

  path_metric dut (.state, .pair, .m1, .m2);

  function automatic int hd(logic [1:0] x, logic [1:0] y);
    return int'(x[0] != y[0]) + int'(x[1] != y[1]);
  endfunction

  task automatic probe(int s, logic [1:0] p, int e1, int e2);
    state = state_t'(s); pair = p;
    #1;
    checks++;
    if (int'(m1) != e1 || int'(m2) != e2) begin
      failures++;
      $display("FAIL state %0d pair %b: %0d %0d expected %0d %0d", s, p, m1, m2, e1, e2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int p = 0; p < 4; p++)
        probe(s, 2'(p), hd(2'(p), OUT[s][0]), hd(2'(p), OUT[s][1]));
    probe(0, 2'b11, 2, 0);
    probe(1, 2'b11, 1, 1);
    probe(2, 2'b10, 0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
