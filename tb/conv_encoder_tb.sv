// conv_encoder_tb: checks the encoder against its function table.
//
// First the worked example: message 1001110 from state A must give the pairs
// 11 10 10 11 01 11 00 ({a1,a0}) and pass through states A B C A B D D; the
// pairs collected last-first form the vector 00110111101011. The next-state
// output must follow the table as well. Then 300 random
// bits with a random enable are checked against the table written out here
// literally (next state and output per state and input), and the register
// must hold its pairs while en is low.
module conv_encoder_tb;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n, en, din;
  logic a0, a1;
  state_t state, state_next;
  int checks = 0, failures = 0;

  // Function table: index [state][input]
  localparam logic [1:0] NXT [4][2] = '{'{2'd0, 2'd1}, '{2'd2, 2'd3}, '{2'd0, 2'd1}, '{2'd2, 2'd3}};
  localparam logic [1:0] OUT [4][2] = '{'{2'b00, 2'b11}, '{2'b10, 2'b01}, '{2'b10, 2'b01}, '{2'b00, 2'b11}};

  conv_encoder dut (.clk, .rst_n, .en, .din, .a0, .a1, .state, .state_next);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic [6:0]  msg = 7'b1001110;        // sent left to right
    logic [1:0]  exp_pairs [7] = '{2'b11, 2'b10, 2'b10, 2'b11, 2'b01, 2'b11, 2'b00};
    logic [1:0]  exp_state [7] = '{2'd0, 2'd1, 2'd2, 2'd0, 2'd1, 2'd3, 2'd3};
    logic [13:0] z;
    logic [1:0]  s_model, hold;
    rst_n = 1'b0; en = 1'b0; din = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 7; i++) begin
      @(negedge clk);
      en = 1'b1; din = msg[6-i];
      @(negedge clk);
      en = 1'b0;
      check($sformatf("example pair %0d", i), {a1, a0}, exp_pairs[i]);
      check($sformatf("example state %0d", i), state, exp_state[i]);
      check($sformatf("example next state %0d", i), state_next, NXT[exp_state[i]][msg[6-i]]);
      z[2*i +: 2] = {a1, a0};
    end
    checks++;
    if (z !== 14'b00110111101011) begin
      failures++;
      $display("FAIL encoded vector %b", z);
    end

    // Random stream against the literal table.
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    s_model = 2'd0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en  = 1'($urandom_range(0, 3) != 0);
      din = 1'($urandom);
      hold = {a1, a0};
      @(posedge clk);
      #1;
      if (en) begin
        check("random pair", {a1, a0}, OUT[s_model][din]);
        check("random state", state, s_model);
        check("random next state", state_next, NXT[s_model][din]);
        s_model = NXT[s_model][din];
      end else begin
        check("hold pair", {a1, a0}, hold);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
