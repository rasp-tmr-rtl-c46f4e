// c17: the ISCAS'85 c17 benchmark circuit, used as the golden
// (fault-free) reference and as the circuit that is triplicated.
//
// Six 2-input NAND gates map the five inputs N1, N2, N3, N6, N7 onto the two
// outputs N22 and N23 through the internal nets N10, N11, N16 and N19:
//   N10 = !(N1 & N3)   N11 = !(N3 & N6)   N16 = !(N2 & N11)
//   N19 = !(N11 & N7)  N22 = !(N10 & N16) N23 = !(N16 & N19)
// Port and net names are the benchmark's own. Purely combinational.
module c17 (
  input  logic N1,
  input  logic N2,
  input  logic N3,
  input  logic N6,
  input  logic N7,
  output logic N22,
  output logic N23
);

  logic n10, n11, n16, n19;

  always_comb begin
    n10 = ~(N1 & N3);
    n11 = ~(N3 & N6);
    n16 = ~(N2 & n11);
    n19 = ~(n11 & N7);
    N22 = ~(n10 & n16);
    N23 = ~(n16 & n19);
  end

endmodule
