// tmr_sim_env: fault-injection environment around the c17 TMR top file.
//
// The same input pattern drives the TMR top file and a golden, fault-free
// c17. A comparator sets cmp to 1 whenever the voted TMR outputs differ from
// the golden outputs. Faults are injected into the three TMR copies through
// faultIn1..3 (location) and fault_mode1..3 (none, bit-flip, stuck-at-0,
// stuck-at-1); with at most one faulty copy cmp stays 0.
//
// The arrangement (TMR top file, golden module, comparator, pass/fail
// output, per-copy fault vectors) follows the document's verification
// set-up; the voted outputs are also brought out so that a user can watch
// them. Purely combinational: the stimulus and its clock live in the
// testbench.
module tmr_sim_env
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
  output logic        N23,
  output logic        cmp
);

  logic gold_N22, gold_N23;

  tmr_top u_tmr (
    .N1, .N2, .N3, .N6, .N7,
    .faultIn1, .faultIn2, .faultIn3,
    .fault_mode1, .fault_mode2, .fault_mode3,
    .N22, .N23
  );

  c17 u_golden (
    .N1, .N2, .N3, .N6, .N7,
    .N22(gold_N22),
    .N23(gold_N23)
  );

  golden_compare #(.WIDTH(2)) u_cmp (
    .golden({gold_N22, gold_N23}),
    .dut   ({N22, N23}),
    .cmp   (cmp)
  );

endmodule
