// fredkin_gate: the 3-input, 3-output reversible Fredkin (controlled-swap)
// gate.
//
//   P = A, Q = A'B ^ AC, R = A'C ^ AB
//
// When the control A is 1, B and C swap places; otherwise they pass. The
// gate is its own inverse. Purely combinational; the equations are the
// document's.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
