// toffoli_gate: the 3-input, 3-output reversible Toffoli (controlled-
// controlled-NOT) gate.
//
//   P = A, Q = B, R = AB ^ C
//
// C is inverted when both controls A and B are 1. The gate is its own
// inverse. Purely combinational; the equations are the document's.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
