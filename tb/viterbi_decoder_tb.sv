// viterbi_decoder_tb: the decoder on its own, fed with serial channel bits.
//
// 1. The opening of the source's simulation: received pairs 11 11 10 from
//    state A. The metrics must read W1/W2 = 2/0, 1/1 (a tie, decided by the
//    look-ahead) and 0/2, the sub machines' NS metrics in the tie 0/2, the
//    decoded bits 1 0 0 and the states B C A.
// 2. The example message 1001110 (plus one flush bit) without errors and
//    with a single error in every position of every pair: all must decode to
//    the message, and the bit of pair k must appear in cycle 2*k + 6.
// 3. Random messages over a noisy channel, with random gaps in the bit
//    stream: every decoded bit is compared with a reference model of the
//    decoding rule written here from the tables, and messages with errors
//    only in isolated pairs must come back unchanged.
module viterbi_decoder_tb;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n, rx_valid, rx_bit;
  logic out_bit, out_valid, test, err_detect, tie_used, pt;
  state_t state;
  pair_t temp1, temp2;
  metric_t w1, w2, r1, r2, r3, r4;
  int checks = 0, failures = 0;
  int cycle;

  localparam logic [1:0] NXT [4][2] = '{'{2'd0, 2'd1}, '{2'd2, 2'd3}, '{2'd0, 2'd1}, '{2'd2, 2'd3}};
  localparam logic [1:0] OUT [4][2] = '{'{2'b00, 2'b11}, '{2'b10, 2'b01}, '{2'b10, 2'b01}, '{2'b00, 2'b11}};
  localparam int MAXP = 80;

  viterbi_decoder dut (.clk, .rst_n, .rx_valid, .rx_bit, .out_bit, .out_valid, .state, .test,
                       .err_detect, .tie_used, .temp1, .temp2, .w1, .w2,
                       .r1, .r2, .r3, .r4, .pt);

  always #5 clk = ~clk;

  // Values seen in the cycle before each out_valid pulse (the deciding one).
  int dec_cnt;
  logic [1:0] seen_w1 [MAXP], seen_w2 [MAXP], seen_r1 [MAXP], seen_r2 [MAXP];
  logic       seen_bit [MAXP];
  logic [1:0] seen_state [MAXP];
  int         seen_cycle [MAXP];
  logic [1:0] pw1, pw2, pr1, pr2;

  always @(posedge clk) begin
    if (!rst_n) begin
      cycle <= 0;
      dec_cnt <= 0;
    end else begin
      cycle <= cycle + 1;
      if (out_valid && dec_cnt < MAXP) begin
        seen_w1[dec_cnt]    <= pw1;
        seen_w2[dec_cnt]    <= pw2;
        seen_r1[dec_cnt]    <= pr1;
        seen_r2[dec_cnt]    <= pr2;
        seen_bit[dec_cnt]   <= out_bit;
        seen_state[dec_cnt] <= state;
        seen_cycle[dec_cnt] <= cycle;
        dec_cnt <= dec_cnt + 1;
      end
      pw1 <= w1; pw2 <= w2; pr1 <= r1; pr2 <= r2;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // Encoder model from the function table.
  task automatic encode(input logic msg [MAXP], input int n, output logic [1:0] pairs [MAXP]);
    int s = 0;
    for (int i = 0; i < n; i++) begin
      pairs[i] = OUT[s][msg[i]];
      s = int'(NXT[s][msg[i]]);
    end
  endtask

  // Reference of the decoding rule: one decision per pair, a tie settled by
  // the best metric one pair ahead along each branch (input 0 wins a draw).
  task automatic ref_decode(input logic [1:0] rx [MAXP], input int n, output logic d [MAXP]);
    int s = 0, a, b, m0, m1, t0, t1;
    for (int k = 0; k < n; k++) begin
      a = hd(rx[k], OUT[s][0]);
      b = hd(rx[k], OUT[s][1]);
      if (a < b) d[k] = 1'b0;
      else if (a > b) d[k] = 1'b1;
      else begin
        t0 = int'(NXT[s][0]); t1 = int'(NXT[s][1]);
        m0 = hd(rx[k+1], OUT[t0][0]); if (hd(rx[k+1], OUT[t0][1]) < m0) m0 = hd(rx[k+1], OUT[t0][1]);
        m1 = hd(rx[k+1], OUT[t1][0]); if (hd(rx[k+1], OUT[t1][1]) < m1) m1 = hd(rx[k+1], OUT[t1][1]);
        d[k] = (m1 < m0);
      end
      s = int'(NXT[s][d[k]]);
    end
  endtask

  // Reset the decoder and send n pairs, a0 first; gap_pct percent of the
  // cycles carry no bit. Waits until the n-1 decisions are out.
  task automatic run_stream(input logic [1:0] rx [MAXP], input int n, input int gap_pct);
    @(negedge clk);
    rst_n = 1'b0; rx_valid = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < n; k++)
      for (int j = 0; j < 2; j++) begin
        while (gap_pct > 0 && $urandom_range(0, 99) < gap_pct) begin
          rx_valid = 1'b0; rx_bit = 1'($urandom);
          @(negedge clk);
        end
        rx_valid = 1'b1; rx_bit = rx[k][j];
        @(negedge clk);
      end
    rx_valid = 1'b0;
    repeat (6) @(negedge clk);
    chk("decisions made", dec_cnt, n - 1);
  endtask

  initial begin
    logic       msg [MAXP];
    logic [1:0] tx [MAXP], rx [MAXP];
    logic       d [MAXP];
    logic [6:0] ex = 7'b1001110;
    logic [1:0] fig [4] = '{2'b11, 2'b11, 2'b10, 2'b11};
    int n, ok, isolated, errs;
    int ties_pt0 = 0, ties_pt1 = 0, clean = 0;

    rst_n = 1'b0; rx_valid = 1'b0; rx_bit = 1'b0;
    repeat (3) @(negedge clk);

    // 1. Opening of the source's waveform.
    for (int k = 0; k < 4; k++) rx[k] = fig[k];
    run_stream(rx, 4, 0);
    chk("fig W1 #0", int'(seen_w1[0]), 2); chk("fig W2 #0", int'(seen_w2[0]), 0);
    chk("fig W1 #1", int'(seen_w1[1]), 1); chk("fig W2 #1", int'(seen_w2[1]), 1);
    chk("fig NS1 #1", int'(seen_r1[1]), 0); chk("fig NS2 #1", int'(seen_r2[1]), 2);
    chk("fig W1 #2", int'(seen_w1[2]), 0); chk("fig W2 #2", int'(seen_w2[2]), 2);
    chk("fig bit #0", int'(seen_bit[0]), 1);
    chk("fig bit #1", int'(seen_bit[1]), 0);
    chk("fig bit #2", int'(seen_bit[2]), 0);
    chk("fig state #0", int'(seen_state[0]), 1);
    chk("fig state #1", int'(seen_state[1]), 2);
    chk("fig state #2", int'(seen_state[2]), 0);

    // 2. The example message, clean and with every single-bit error.
    for (int i = 0; i < 7; i++) msg[i] = ex[6-i];
    msg[7] = 1'b0;
    encode(msg, 8, tx);
    for (int e = -1; e < 14; e++) begin
      for (int k = 0; k < 8; k++) rx[k] = tx[k];
      if (e >= 0) rx[e/2][e%2] = ~rx[e/2][e%2];
      run_stream(rx, 8, 0);
      for (int k = 0; k < 7; k++) begin
        chk($sformatf("example err %0d bit %0d", e, k), int'(seen_bit[k]), int'(msg[k]));
        chk($sformatf("latency bit %0d", k), seen_cycle[k], 2 * k + 6);
      end
    end

    // 3. Random messages, noisy channel, gaps.
    for (int m = 0; m < 120; m++) begin
      n = $urandom_range(4, MAXP - 1);
      for (int i = 0; i < n; i++) msg[i] = 1'($urandom);
      encode(msg, n, tx);
      isolated = 1;
      errs = 0;
      for (int k = 0; k < n; k++) begin
        rx[k] = tx[k];
        if (m % 3 == 0) begin
          // Isolated single errors: at most one flipped bit in any two
          // consecutive pairs, never in the flush pair.
          if (k < n - 1 && (k == 0 || rx[k-1] == tx[k-1]) && $urandom_range(0, 3) == 0) begin
            rx[k][$urandom_range(0, 1)] ^= 1'b1;
            errs++;
          end
        end else begin
          for (int j = 0; j < 2; j++)
            if ($urandom_range(0, 99) < 8) begin
              rx[k][j] ^= 1'b1;
              errs++;
            end
        end
      end
      isolated = (m % 3 == 0);
      ref_decode(rx, n - 1, d);
      run_stream(rx, n, (m % 2) ? 30 : 0);
      ok = 1;
      for (int k = 0; k < n - 1; k++) begin
        chk("random vs reference", int'(seen_bit[k]), int'(d[k]));
        if (isolated) chk("isolated errors corrected", int'(seen_bit[k]), int'(msg[k]));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
