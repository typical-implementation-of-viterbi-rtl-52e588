// clkgen_tb: the phase must start at 0 after reset, toggle exactly on the
// cycles with bit_valid, and pair_tick must mark a valid bit in phase 1.
module clkgen_tb;
  logic clk = 1'b0;
  logic rst_n, bit_valid, phase, pair_tick;
  int checks = 0, failures = 0;
  logic model;

  clkgen dut (.clk, .rst_n, .bit_valid, .phase, .pair_tick);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; bit_valid = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    model = 1'b0;
    for (int i = 0; i < 500; i++) begin
      bit_valid = (i < 20) ? 1'b1 : 1'($urandom);
      #1;
      checks++;
      if (phase !== model || pair_tick !== (model & bit_valid)) begin
        failures++;
        $display("FAIL cycle %0d: phase %b tick %b, expected %b %b", i, phase, pair_tick,
                 model, model & bit_valid);
      end
      if (bit_valid) model = ~model;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
