// golden_compare: pass/fail comparator of the fault-injection set-up.
//
// It compares the outputs of the golden (fault-free) circuit with the
// outputs of the TMR circuit, bit for bit. cmp is 0 when all bits agree,
// meaning the TMR circuit has masked whatever fault was injected, and 1
// when any bit differs. The meaning of cmp follows the document; the
// reduction (any differing bit gives 1) and the WIDTH parameter are this
// design's own choices. Purely combinational.
module golden_compare #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] golden,
  input  logic [WIDTH-1:0] dut,
  output logic             cmp
);

  always_comb cmp = |(golden ^ dut);

endmodule
