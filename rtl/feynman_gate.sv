// Feynman gate (controlled NOT), a 2-input/2-output reversible gate.
//
//   p = a        (control passes through)
//   q = a ^ b    (target is inverted when the control is 1)
//
// Quantum cost 1. In this design it copies or XORs signals inside the
// reversible 2x2 multiplier, the carry merge and the half adder assembly.
// Purely combinational; no clock.
// The design names this gate; its equations are the standard definition
// from the reversible-logic literature.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
