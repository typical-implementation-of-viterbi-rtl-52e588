// pair_register_tb: a random bit stream with random gaps is fed with its
// own phase counter; after each completed pair temp1 must hold it as
// {second bit, first bit}, temp2 the previous pair, and both must hold
// still between pairs. The valid flags must rise after the first and the
// second pair.
module pair_register_tb;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n, phase, rx_valid, rx_bit;
  pair_t temp1, temp2;
  logic temp1_valid, temp2_valid;
  int checks = 0, failures = 0;

  pair_register dut (.clk, .rst_n, .phase, .rx_valid, .rx_bit, .temp1, .temp2,
                     .temp1_valid, .temp2_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] e1, e2;
    logic       first;
    int         npairs;
    rst_n = 1'b0; phase = 1'b0; rx_valid = 1'b0; rx_bit = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    npairs = 0; e1 = '0; e2 = '0; first = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      rx_valid = 1'($urandom_range(0, 2) != 0);
      rx_bit   = 1'($urandom);
      @(posedge clk);
      if (rx_valid) begin
        if (!phase) first = rx_bit;
        else begin
          e2 = e1; e1 = {rx_bit, first};
          npairs++;
        end
      end
      #1;
      if (rx_valid) phase = ~phase;
      checks++;
      if (temp1_valid !== (npairs >= 1) || temp2_valid !== (npairs >= 2) ||
          (npairs >= 1 && temp1 !== e1) || (npairs >= 2 && temp2 !== e2)) begin
        failures++;
        $display("FAIL step %0d: temp1 %b temp2 %b valid %b%b, expected %b %b pairs %0d",
                 i, temp1, temp2, temp1_valid, temp2_valid, e1, e2, npairs);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
