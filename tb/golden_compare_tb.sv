// golden_compare_tb: exhaustive self-checking test of the comparator.
//
// All pairs of 2-bit golden and TMR words are applied; cmp must be 0
// exactly when the two words are equal.
module golden_compare_tb;

  logic [1:0] golden, dut_in;
  logic cmp;

  int checks = 0;
  int failures = 0;

  golden_compare #(.WIDTH(2)) dut (.golden(golden), .dut(dut_in), .cmp(cmp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 4; g++)
      for (int d = 0; d < 4; d++) begin
        golden = 2'(g);
        dut_in = 2'(d);
        #1;
        checks++;
        if (cmp !== (g != d)) begin
          failures++;
          $display("golden=%0d dut=%0d cmp=%b", g, d, cmp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
