// c17_tb: exhaustive self-checking test of the golden c17 circuit.
//
// All 32 input patterns are applied, driven from a 5-bit counter e. Each
// output is compared with a two-level form of the circuit worked out by
// hand from the NAND network:
//   N22 = N1&N3 | N2&!(N3&N6)      N23 = !(N3&N6) & (N2|N7)
module c17_tb;

  logic N1, N2, N3, N6, N7, N22, N23;
  logic [4:0] e;
  logic exp22, exp23;

  int checks = 0;
  int failures = 0;

  c17 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      e = 5'(i);
      {N7, N6, N3, N2, N1} = e;
      #1;
      exp22 = (N1 & N3) | (N2 & ~(N3 & N6));
      exp23 = ~(N3 & N6) & (N2 | N7);
      checks += 2;
      if (N22 !== exp22 || N23 !== exp23) begin
        failures++;
        $display("e=%0d N22=%b/%b N23=%b/%b", e, N22, exp22, N23, exp23);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
