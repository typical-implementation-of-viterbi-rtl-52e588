// min_path_identifier_tb: all combinations of the two 2-bit minima. PT must
// select sub machine 2 only when its metric is strictly smaller; equal
// minima must keep PT = 0.
module min_path_identifier_tb;
  import viterbi_pkg::*;

  metric_t min1, min2;
  logic pt;
  int checks = 0, failures = 0;

  min_path_identifier dut (.min1, .min2, .pt);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        min1 = 2'(a); min2 = 2'(b);
        #1;
        checks++;
        if (pt !== (b < a)) begin
          failures++;
          $display("FAIL min1 %0d min2 %0d: pt %b", a, b, pt);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
