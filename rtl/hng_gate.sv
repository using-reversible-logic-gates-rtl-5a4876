// HNG gate, a 4-input/4-output reversible gate used as a full adder.
//
//   p = a
//   q = b
//   r = a ^ b ^ c
//   s = ((a ^ b) & c) ^ (a & b) ^ d
//
// With d = 0, r is the full-adder sum of a, b and c and s its carry out;
// p and q are garbage outputs that keep the mapping reversible. Quantum
// cost 6. Purely combinational; no clock.
// The design names this gate; its equations are the standard definition
// from the reversible-logic literature.
module hng_gate (
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
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
