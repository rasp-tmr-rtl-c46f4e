// c17_fi: one redundant copy of the c17 circuit with fault-injection
// inputs, as instantiated three times inside the TMR top file.
//
// The logic is the c17 NAND network (see c17.sv). A fault can be placed on
// any of the four internal NAND outputs N10, N11, N16, N19: fault_sel
// (the "faultIn" vector of the copy) picks the location, fault_mode picks
// what happens there: nothing, a bit-flip, stuck-at-0 or stuck-at-1. The
// fault acts on the net itself, so every gate reading that net sees the
// faulty value.
//
// The document renames the copies c17_1, c17_2, c17_3 and suffixes their
// outputs with _tmr1.._tmr3; here one module is instantiated three times,
// and the suffixes appear on the nets of the top file instead. Four faults
// per copy selected by a 2-bit vector follow the document; which nets carry
// the faults and the fault_mode input are this design's own choices.
// Purely combinational.
module c17_fi
  import rasp_tmr_pkg::*;
(
  input  logic        N1,
  input  logic        N2,
  input  logic        N3,
  input  logic        N6,
  input  logic        N7,
  input  fault_sel_t  fault_sel,
  input  fault_mode_e fault_mode,
  output logic        N22,
  output logic        N23
);

  logic n10, n11, n16, n19;

  always_comb begin
    n10 = fault_apply(~(N1 & N3),   fault_mode, fault_sel == SITE_N10);
    n11 = fault_apply(~(N3 & N6),   fault_mode, fault_sel == SITE_N11);
    n16 = fault_apply(~(N2 & n11),  fault_mode, fault_sel == SITE_N16);
    n19 = fault_apply(~(n11 & N7),  fault_mode, fault_sel == SITE_N19);
    N22 = ~(n10 & n16);
    N23 = ~(n16 & n19);
  end

endmodule
