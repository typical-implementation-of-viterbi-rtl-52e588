// main_machine_tb: the main machine is forced into every state and given
// every pair with both PT values; the next state must follow the decoder's
// next-state table, written out here row by row:
//   present  W1<W2  W1>W2  W1=W2,PT=0  W1=W2,PT=1
//   A        A      B      A           B
//   B        C      D      C           D
//   C        A      B      A           B
//   D        C      D      C           D
// with W1/W2 the distances to the branch pairs of the encoder table. The
// decoded bit, the tie flag, the error flag and the one-cycle out_valid pulse
// are checked too, and the state must not move without step.
module main_machine_tb;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n, step, pt;
  pair_t pair;
  state_t state;
  metric_t w1, w2;
  logic test, out_bit, out_valid, err_detect, tie_used;
  int checks = 0, failures = 0;

  localparam logic [1:0] OUT [4][2] = '{'{2'b00, 2'b11}, '{2'b10, 2'b01}, '{2'b10, 2'b01}, '{2'b00, 2'b11}};
  // TABLE[state][case]: case 0 W1<W2, 1 W1>W2, 2 tie PT=0, 3 tie PT=1
  localparam logic [1:0] TABLE [4][4] = '{'{2'd0, 2'd1, 2'd0, 2'd1}, '{2'd2, 2'd3, 2'd2, 2'd3},
                                          '{2'd0, 2'd1, 2'd0, 2'd1}, '{2'd2, 2'd3, 2'd2, 2'd3}};
  // A short walk from A to each state: its inputs with error-free pairs.
  localparam logic [1:0] WALK [4] = '{2'b00, 2'b01, 2'b10, 2'b11};

  main_machine dut (.clk, .rst_n, .step, .pair, .pt, .state, .w1, .w2, .test,
                    .out_bit, .out_valid, .err_detect, .tie_used);

  always #5 clk = ~clk;

  function automatic int hd(logic [1:0] x, logic [1:0] y);
    return int'(x[0] != y[0]) + int'(x[1] != y[1]);
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Step once with pair p, path tracer t.
  task automatic do_step(logic [1:0] p, logic t);
    @(negedge clk);
    pair = p; pt = t; step = 1'b1;
    @(negedge clk);
    step = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cs, e1, e2, ec, en, eb;
    rst_n = 1'b0; step = 1'b0; pt = 1'b0; pair = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1 chk("reset state", int'(state), 0);
    for (int s = 0; s < 4; s++)
      for (int p = 0; p < 4; p++)
        for (int t = 0; t < 2; t++) begin
          // Reset, then walk to state s with error-free pairs.
          @(negedge clk);
          rst_n = 1'b0;
          @(negedge clk);
          rst_n = 1'b1;
          cs = 0;
          for (int k = 1; k >= 0; k--) begin
            do_step(OUT[cs][WALK[s][k]], 1'b0);
            cs = int'(TABLE[cs][WALK[s][k] ? 1 : 0]);
          end
          chk("walk", int'(state), s);
          e1 = hd(2'(p), OUT[s][0]);
          e2 = hd(2'(p), OUT[s][1]);
          ec = (e1 < e2) ? 0 : (e1 > e2) ? 1 : 2 + t;
          en = int'(TABLE[s][ec]);
          eb = en % 2;
          pair = 2'(p); pt = 1'(t);
          #1;
          chk("w1", int'(w1), e1);
          chk("w2", int'(w2), e2);
          chk("test", int'(test), int'(e1 == e2));
          // No step: the state holds.
          @(negedge clk);
          chk("hold", int'(state), s);
          chk("no out_valid", int'(out_valid), 0);
          do_step(2'(p), 1'(t));
          chk($sformatf("next state from %0d pair %0d pt %0d", s, p, t), int'(state), en);
          chk("out_bit", int'(out_bit), eb);
          chk("out_valid", int'(out_valid), 1);
          chk("err_detect", int'(err_detect), int'(((eb != 0) ? e2 : e1) != 0));
          chk("tie_used", int'(tie_used), int'(e1 == e2));
          @(negedge clk);
          chk("out_valid pulse", int'(out_valid), 0);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
