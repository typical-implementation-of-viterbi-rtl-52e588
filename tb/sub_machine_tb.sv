// sub_machine_tb: both sub machines (input-0 and input-1 branch) get random
// main states and pairs with a random load strobe. After a load each must
// hold the branch target of the main state (worked out from the encoder
// table written here), the two metrics of the pair from that target and
// their minimum; without load the registers must hold.
module sub_machine_tb;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n, load;
  state_t main_state;
  pair_t pair;
  state_t  s_st [2];
  metric_t s_ra [2], s_rb [2], s_min [2];
  int checks = 0, failures = 0;

  localparam logic [1:0] NXT [4][2] = '{'{2'd0, 2'd1}, '{2'd2, 2'd3}, '{2'd0, 2'd1}, '{2'd2, 2'd3}};
  localparam logic [1:0] OUT [4][2] = '{'{2'b00, 2'b11}, '{2'b10, 2'b01}, '{2'b10, 2'b01}, '{2'b00, 2'b11}};

  sub_machine #(.BRANCH(1'b0)) dut1 (.clk, .rst_n, .load, .main_state, .pair,
    .sub_state(s_st[0]), .r_a(s_ra[0]), .r_b(s_rb[0]), .min_metric(s_min[0]));
  sub_machine #(.BRANCH(1'b1)) dut2 (.clk, .rst_n, .load, .main_state, .pair,
    .sub_state(s_st[1]), .r_a(s_ra[1]), .r_b(s_rb[1]), .min_metric(s_min[1]));

  always #5 clk = ~clk;

  function automatic int hd(logic [1:0] x, logic [1:0] y);
    return int'(x[0] != y[0]) + int'(x[1] != y[1]);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int es [2], ea [2], eb [2], em [2];
    rst_n = 1'b0; load = 1'b0; main_state = ST_A; pair = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 2; b++) begin es[b] = 0; ea[b] = 0; eb[b] = 0; em[b] = 0; end
    for (int i = 0; i < 600; i++) begin
      load = (i < 16) ? 1'b1 : 1'($urandom);
      if (i < 16) begin
        main_state = state_t'(i / 4); pair = 2'(i % 4);
      end else begin
        main_state = state_t'($urandom_range(0, 3)); pair = 2'($urandom_range(0, 3));
      end
      if (load)
        for (int b = 0; b < 2; b++) begin
          es[b] = int'(NXT[main_state][b]);
          ea[b] = hd(pair, OUT[es[b]][0]);
          eb[b] = hd(pair, OUT[es[b]][1]);
          em[b] = (ea[b] < eb[b]) ? ea[b] : eb[b];
        end
      @(posedge clk);
      #1;
      for (int b = 0; b < 2; b++) begin
        checks++;
        if (int'(s_st[b]) != es[b] || int'(s_ra[b]) != ea[b] || int'(s_rb[b]) != eb[b] ||
            int'(s_min[b]) != em[b]) begin
          failures++;
          $display("FAIL step %0d sub %0d: st %0d r %0d %0d min %0d, expected %0d %0d %0d %0d",
                   i, b + 1, s_st[b], s_ra[b], s_rb[b], s_min[b], es[b], ea[b], eb[b], em[b]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
