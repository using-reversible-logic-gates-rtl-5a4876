// Peres gate, a 3-input/3-output reversible gate (a Toffoli followed by a
// Feynman on the same two controls).
//
//   p = a
//   q = a ^ b
//   r = (a & b) ^ c
//
// Quantum cost 4. With c = 0 it is a half adder: q is the sum and r the
// carry; r alone gives a reversible AND. Purely combinational; no clock.
// The design names this gate; its equations are the standard definition
// from the reversible-logic literature.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
