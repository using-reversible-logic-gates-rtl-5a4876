// Reversible 2x2 Urdhva Tiryakbhayam multiplier: p = a * b, 2-bit unsigned
// operands, 4-bit product, purely combinational.
//
// The vertical-and-crosswise rule gives the product bits as
//   p0 = a0 b0                     (vertical, low column)
//   p1 = a1 b0 ^ a0 b1             (crosswise)
//   p2 = a1 b1 ^ (a1 b0 a0 b1)     (vertical, high column, plus the carry)
//   p3 = a1 b1 a0 b0               (carry out of the high column)
// which is the AND-gate and two-half-adder circuit of the block diagram.
// Here it is mapped onto five Peres gates and one Feynman gate with four
// constant-0 inputs, quantum cost 5*4 + 1 = 21, as the design calls for:
//   PG1 (a0, b0, 0)    -> r = a0 b0 = p0
//   PG2 (a1, b1, 0)    -> r = a1 b1
//   PG3 (a1, b0, 0)    -> r = a1 b0
//   PG4 (a0, b1, a1b0) -> r = a0 b1 ^ a1 b0 = p1
//   PG5 (a1b1, p0, 0)  -> p = a1 b1, r = a1 b1 a0 b0 = p3
//   FG  (p3, a1b1)     -> q = p3 ^ a1 b1 = a1 b1 & ~(a0 b0) = p2
// The p2 identity holds because a1 b0 a0 b1 equals a1 b1 a0 b0. The exact
// gate wiring is this design's own; the gate counts and quantum cost follow
// the reference design. Fan-out of primary inputs is by plain wiring, not by
// extra Feynman copies. The unused gate outputs are the garbage outputs:
// ten in this wiring (two on each of PG1..PG4, one on PG5 and the copy of p3
// on the Feynman gate), where the reference design counts eleven.
module ut_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a1b1, a1b0, a1b1_pass, p3_copy_unused;
  logic [8:0] garbage;

  peres_gate pg1 (.a(a[0]), .b(b[0]), .c(1'b0),
                  .p(garbage[0]), .q(garbage[1]), .r(p[0]));
  peres_gate pg2 (.a(a[1]), .b(b[1]), .c(1'b0),
                  .p(garbage[2]), .q(garbage[3]), .r(a1b1));
  peres_gate pg3 (.a(a[1]), .b(b[0]), .c(1'b0),
                  .p(garbage[4]), .q(garbage[5]), .r(a1b0));
  peres_gate pg4 (.a(a[0]), .b(b[1]), .c(a1b0),
                  .p(garbage[6]), .q(garbage[7]), .r(p[1]));
  peres_gate pg5 (.a(a1b1), .b(p[0]), .c(1'b0),
                  .p(a1b1_pass), .q(garbage[8]), .r(p[3]));
  feynman_gate fg (.a(p[3]), .b(a1b1_pass), .p(p3_copy_unused), .q(p[2]));
endmodule
