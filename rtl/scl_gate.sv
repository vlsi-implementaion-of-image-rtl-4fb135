// scl_gate: the 4-input, 4-output reversible SCL gate.
//
//   P = A, Q = B, R = C, S = A(B + C) ^ D
//
// Three inputs pass straight through and the fourth is XORed with a function
// of them, so applying the gate twice restores the inputs: the same gate
// encrypts and decrypts. Purely combinational. The equations are the
// document's.
module scl_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = c;
  assign s = (a & (b | c)) ^ d;
endmodule
