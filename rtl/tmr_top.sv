// tmr_top: the TMR top file for the c17 circuit.
//
// Three copies of c17 (inst_tmr1, inst_tmr2, inst_tmr3) receive the same
// five inputs in parallel. Each output port of c17 gets its own proposed
// majority voter: N22 is voted from N22_tmr1..3 and N23 from N23_tmr1..3.
// Copy k drives voter input Tk, so copy 3 steers the voter's multiplexer.
// A fault confined to one copy never reaches N22 or N23.
//
// The structure (three instances, one voter per output port, _tmrN output
// naming) follows the document. Each copy has its own fault-injection
// command (faultIn1..3 with fault_mode1..3, see c17_fi.sv); with every
// fault_mode at FM_NONE the block is the plain TMR circuit.
// Purely combinational, no clock.
module tmr_top
  import rasp_tmr_pkg::*;
(
  input  logic        N1,
  input  logic        N2,
  input  logic        N3,
  input  logic        N6,
  input  logic        N7,
  input  fault_sel_t  faultIn1,
  input  fault_sel_t  faultIn2,
  input  fault_sel_t  faultIn3,
  input  fault_mode_e fault_mode1,
  input  fault_mode_e fault_mode2,
  input  fault_mode_e fault_mode3,
  output logic        N22,
  output logic        N23
);

  logic N22_tmr1, N22_tmr2, N22_tmr3;
  logic N23_tmr1, N23_tmr2, N23_tmr3;

  c17_fi inst_tmr1 (
    .N1, .N2, .N3, .N6, .N7,
    .fault_sel (faultIn1),
    .fault_mode(fault_mode1),
    .N22       (N22_tmr1),
    .N23       (N23_tmr1)
  );

  c17_fi inst_tmr2 (
    .N1, .N2, .N3, .N6, .N7,
    .fault_sel (faultIn2),
    .fault_mode(fault_mode2),
    .N22       (N22_tmr2),
    .N23       (N23_tmr2)
  );

  c17_fi inst_tmr3 (
    .N1, .N2, .N3, .N6, .N7,
    .fault_sel (faultIn3),
    .fault_mode(fault_mode3),
    .N22       (N22_tmr3),
    .N23       (N23_tmr3)
  );

  mvc_voter #(.WIDTH(1)) voter_N22 (
    .t1(N22_tmr1), .t2(N22_tmr2), .t3(N22_tmr3), .v(N22)
  );

  mvc_voter #(.WIDTH(1)) voter_N23 (
    .t1(N23_tmr1), .t2(N23_tmr2), .t3(N23_tmr3), .v(N23)
  );

endmodule
