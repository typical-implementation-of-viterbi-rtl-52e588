// viterbi_codec_top_tb: end-to-end run of encoder, channel and decoder at
// the design's only configuration (the top has no parameters).
//
// Each message is sent after a reset, one bit per pair period, followed by
// one flush bit so that the last message bit can be decided. The channel
// flips bits where the error pattern says so. Checked:
//  - the transmitted bits of message 1001110 are the pairs 11 10 10 11 01 11
//    00, a0 first, and decode to 1001110 with no error and with a single
//    error in any of the 14 code bits;
//  - decoded bit j appears in cycle 2*j + 8 after reset;
//  - long random messages with isolated single errors come back unchanged;
//  - with random errors every decoded bit equals a reference model of the
//    decoding rule.
// Each decision mechanism must occur at least once: W1 < W2, W1 > W2, a
// tie settled by sub machine 1 (PT = 0) and by sub machine 2 (PT = 1), and
// a detected error.
module viterbi_codec_top_tb;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n, msg_bit, msg_ready, noise, tx_bit, rx_bit;
  logic out_bit, out_valid, test, err_detect, tie_used;
  state_t dec_state, enc_state;
  int checks = 0, failures = 0;

  localparam logic [1:0] NXT [4][2] = '{'{2'd0, 2'd1}, '{2'd2, 2'd3}, '{2'd0, 2'd1}, '{2'd2, 2'd3}};
  localparam logic [1:0] OUT [4][2] = '{'{2'b00, 2'b11}, '{2'b10, 2'b01}, '{2'b10, 2'b01}, '{2'b00, 2'b11}};
  localparam int MAXN = 2100;

  viterbi_codec_top dut (.clk, .rst_n, .msg_bit, .msg_ready, .noise, .tx_bit, .rx_bit,
                         .out_bit, .out_valid, .dec_state, .test, .err_detect, .tie_used,
                         .enc_state);

  always #5 clk = ~clk;

  // Message, error pattern (per channel bit) and what came out.
  logic msg [MAXN];
  logic flip [2*MAXN];
  logic got [MAXN];
  logic txs [2*MAXN];
  int   got_cycle [MAXN];
  int   n_out, cycle;

  int cnt_w1_lt = 0, cnt_w1_gt = 0, cnt_pt0 = 0, cnt_pt1 = 0, cnt_err = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      cycle <= 0;
      n_out <= 0;
    end else begin
      cycle <= cycle + 1;
      if (cycle >= 2 && cycle < 2 * MAXN + 2) txs[cycle-2] <= tx_bit;
      if (out_valid) begin
        got[n_out]       <= out_bit;
        got_cycle[n_out] <= cycle;
        n_out            <= n_out + 1;
        if (!tie_used && !out_bit) cnt_w1_lt++;
        if (!tie_used &&  out_bit) cnt_w1_gt++;
        if ( tie_used && !out_bit) cnt_pt0++;
        if ( tie_used &&  out_bit) cnt_pt1++;
        if (err_detect)            cnt_err++;
      end
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

  task automatic chk(string what, int g, int e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, g, e);
    end
  endtask

  // Send msg[0..n-1] (the last one is the flush bit) with the error pattern.
  task automatic send(input int n);
    int j = 0;
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2 * n + 8; c++) begin
      msg_bit = (j < n) ? msg[j] : 1'b0;
      noise   = (c >= 2 && c < 2 * n + 2) ? flip[c-2] : 1'b0;
      if (msg_ready) j++;
      @(negedge clk);
    end
    chk("bits decoded", n_out, n);
  endtask

  // Reference of the decoding rule, from the received pairs.
  task automatic ref_decode(input int n, output logic d [MAXN]);
    logic [1:0] rx [MAXN];
    int s = 0, a, b, m0, m1, t0, t1;
    s = 0;
    for (int k = 0; k < n; k++) begin
      rx[k] = OUT[s][msg[k]] ^ {flip[2*k+1], flip[2*k]};
      s = int'(NXT[s][msg[k]]);
    end
    s = 0;
    for (int k = 0; k < n - 1; k++) begin
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

  initial begin
    logic [6:0]  ex = 7'b1001110;
    logic [13:0] ex_tx = 14'b11_10_10_11_01_11_00;   // {a1,a0} per pair, first pair leftmost
    logic        d [MAXN];
    int n;

    rst_n = 1'b0; msg_bit = 1'b0; noise = 1'b0;
    repeat (3) @(negedge clk);

    // Example message: clean, then every single-bit error.
    for (int e = -1; e < 14; e++) begin
      for (int i = 0; i < 7; i++) msg[i] = ex[6-i];
      msg[7] = 1'b0;
      for (int i = 0; i < 16; i++) flip[i] = (i == e);
      send(8);
      if (e < 0)
        for (int k = 0; k < 7; k++) begin
          chk($sformatf("tx a0 pair %0d", k), int'(txs[2*k]),   int'(ex_tx[13-2*k-1]));
          chk($sformatf("tx a1 pair %0d", k), int'(txs[2*k+1]), int'(ex_tx[13-2*k]));
        end
      for (int k = 0; k < 7; k++) begin
        chk($sformatf("example error %0d bit %0d", e, k), int'(got[k]), int'(msg[k]));
        chk($sformatf("latency bit %0d", k), got_cycle[k], 2 * k + 8);
      end
    end

    // Long messages with isolated single errors: corrected.
    for (int r = 0; r < 3; r++) begin
      n = MAXN;
      for (int i = 0; i < n; i++) msg[i] = 1'($urandom);
      for (int i = 0; i < 2 * n; i++) flip[i] = 1'b0;
      for (int k = 0; k < n - 1; k++)
        if ((k == 0 || !(flip[2*k-2] || flip[2*k-1])) && $urandom_range(0, 2) == 0)
          flip[2*k + $urandom_range(0, 1)] = 1'b1;
      send(n);
      for (int k = 0; k < n - 1; k++) chk("isolated errors corrected", int'(got[k]), int'(msg[k]));
    end

    // Random errors: against the reference model.
    for (int r = 0; r < 4; r++) begin
      n = MAXN;
      for (int i = 0; i < n; i++) msg[i] = 1'($urandom);
      for (int i = 0; i < 2 * n; i++) flip[i] = ($urandom_range(0, 99) < 3 + 4 * r);
      ref_decode(n, d);
      send(n);
      for (int k = 0; k < n - 1; k++) chk("random vs reference", int'(got[k]), int'(d[k]));
    end

    $display("mechanisms: W1<W2 %0d, W1>W2 %0d, tie PT=0 %0d, tie PT=1 %0d, error detected %0d",
             cnt_w1_lt, cnt_w1_gt, cnt_pt0, cnt_pt1, cnt_err);
    chk("W1<W2 seen", int'(cnt_w1_lt > 0), 1);
    chk("W1>W2 seen", int'(cnt_w1_gt > 0), 1);
    chk("tie PT=0 seen", int'(cnt_pt0 > 0), 1);
    chk("tie PT=1 seen", int'(cnt_pt1 > 0), 1);
    chk("error detected seen", int'(cnt_err > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
