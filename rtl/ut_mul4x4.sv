// 4x4 Urdhva Tiryakbhayam multiplier: p = a * b, 4-bit unsigned operands,
// 8-bit product, purely combinational. It is the "4-BIT MUL" used four times
// by the 8x8 multiplier.
//
// The operands are split into 2-bit halves aH:aL and bH:bL, and four
// reversible 2x2 multipliers form the vertical and crosswise products
//   q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH.
// Then, with three 4-bit adders (no carry in):
//   add1: q1 + q2                 -> s1, carry ca1  (crosswise column)
//   add2: s1 + {00, q0[3:2]}      -> s2, carry ca2
//   add3: q3 + {0, k, s2[3:2]}    -> p[7:4]
// where p[1:0] = q0[1:0], p[3:2] = s2[1:0] and k = ca1 ^ ca2. Both carries
// have weight 2^6. They are never 1 together (if ca1 = 1 then s1 <= 2 and
// s1 + q0[3:2] <= 4), so a single Feynman gate XOR adds them exactly. The
// adder of add3 never carries out, since a 4x4 product fits in 8 bits.
//
// The split into four 2x2 products and the three-adder arrangement follow
// the reference block diagram; counting ca2 as well as ca1 at add3 is this
// design's own correction (ca2 is 1, for example, for 15 * 11). ADDER selects
// the adder structure (see ut_pkg).
module ut_mul4x4
  import ut_pkg::*;
#(
  parameter adder_kind_e ADDER = ADDER_RCA
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] s1, s2;
  logic       ca1, ca2, k, ca3_unused, ca1_pass_unused;

  ut_mul2x2 m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  ut_mul2x2 m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  ut_mul2x2 m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  ut_mul2x2 m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  ut_adder #(.WIDTH(4), .ADDER(ADDER)) add1 (
    .a(q1), .b(q2), .sum(s1), .cout(ca1));
  ut_adder #(.WIDTH(4), .ADDER(ADDER)) add2 (
    .a(s1), .b({2'b00, q0[3:2]}), .sum(s2), .cout(ca2));

  feynman_gate merge (.a(ca1), .b(ca2), .p(ca1_pass_unused), .q(k));

  ut_adder #(.WIDTH(4), .ADDER(ADDER)) add3 (
    .a(q3), .b({1'b0, k, s2[3:2]}), .sum(p[7:4]), .cout(ca3_unused));

  assign p[1:0] = q0[1:0];
  assign p[3:2] = s2[1:0];
endmodule
