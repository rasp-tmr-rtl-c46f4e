// mvc_voter: the proposed 2-out-of-3 majority voter, applied bitwise.
//
// For every bit the voter forms N1 = T1 AND T2 and N2 = T1 OR T2 and uses
// T3 as the select of a 2:1 multiplexer: T3 = 0 passes N1, T3 = 1 passes N2.
// If T3 is 0 the output is 1 only when both T1 and T2 are 1; if T3 is 1 the
// output is 1 when either of them is 1. That is exactly the majority of
// the three inputs, so any single corrupted input is out-voted.
//
// Gate structure, select polarity and truth table follow the document. The
// WIDTH parameter is this design's own addition: it builds one such voter
// per bit so that a multi-bit output port is voted bit by bit (the document
// adds one voter per output port of a single-bit benchmark).
//
// Interface: t1, t2, t3 are the outputs of the three redundant copies, v is
// the voted value. Purely combinational, no clock, zero latency.
module mvc_voter #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] t1,
  input  logic [WIDTH-1:0] t2,
  input  logic [WIDTH-1:0] t3,
  output logic [WIDTH-1:0] v
);

  logic [WIDTH-1:0] n1;  // AND branch, mux input 0
  logic [WIDTH-1:0] n2;  // OR branch, mux input 1

  always_comb begin
    n1 = t1 & t2;
    n2 = t1 | t2;
    for (int unsigned b = 0; b < WIDTH; b++) begin
      v[b] = t3[b] ? n2[b] : n1[b];
    end
  end

endmodule
