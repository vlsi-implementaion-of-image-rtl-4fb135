// feynman_gate: the 2-input, 2-output reversible Feynman (controlled-NOT)
// gate.
//
//   P = A, Q = A ^ B
//
// The gate is its own inverse. Purely combinational; the equations are the
// document's.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
