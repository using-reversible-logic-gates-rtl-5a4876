// 8x8 Urdhva Tiryakbhayam multiplier built from reversible gates:
// p = a * b, 8-bit unsigned operands, 16-bit product, purely combinational
// (a new product is available one propagation delay after the operands
// change; there is no clock, register or handshake).
//
// The operands are split into nibbles A7..A4:A3..A0 and B7..B4:B3..B0. Four
// 4x4 UT multipliers form all partial products in parallel:
//   m0 = aL*bL   m1 = aH*bL   m2 = aL*bH   m3 = aH*bH.
// They are summed by
//   P3..P0   = m0[3:0]
//   add1     : m1 + m2                          -> s1, carry c1
//   add2     : s1 + {m3[3:0], m0[7:4]}          -> P11..P4, carry c2
//   merge    : cnt = c1 + c2                    (carry_merge)
//   assembly : P15..P12 = m3[7:4] + cnt         (half_adder_assembly)
// This is the arrangement of the reference block diagram (two 8-bit adders,
// a gate joining their carries and a half adder assembly for the top
// nibble). The diagram joins the carries with an OR gate; here they are
// counted, because both are 1 for 248 of the 65536 operand pairs and an OR
// would then give a product 4096 too small. ADDER selects the reversible
// HNG ripple carry adders (default) or carry lookahead adders.
module ut_mul8x8
  import ut_pkg::*;
#(
  parameter adder_kind_e ADDER = ADDER_RCA
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] m0, m1, m2, m3;
  logic [7:0] s1;
  logic       c1, c2;
  logic [1:0] cnt;

  ut_mul4x4 #(.ADDER(ADDER)) mul_ll (.a(a[3:0]), .b(b[3:0]), .p(m0));
  ut_mul4x4 #(.ADDER(ADDER)) mul_hl (.a(a[7:4]), .b(b[3:0]), .p(m1));
  ut_mul4x4 #(.ADDER(ADDER)) mul_lh (.a(a[3:0]), .b(b[7:4]), .p(m2));
  ut_mul4x4 #(.ADDER(ADDER)) mul_hh (.a(a[7:4]), .b(b[7:4]), .p(m3));

  ut_adder #(.WIDTH(8), .ADDER(ADDER)) add1 (
    .a(m1), .b(m2), .sum(s1), .cout(c1));
  ut_adder #(.WIDTH(8), .ADDER(ADDER)) add2 (
    .a(s1), .b({m3[3:0], m0[7:4]}), .sum(p[11:4]), .cout(c2));

  carry_merge merge (.c1(c1), .c2(c2), .cnt(cnt));

  half_adder_assembly #(.WIDTH(4)) assembly (
    .x(m3[7:4]), .inc(cnt), .y(p[15:12]));

  assign p[3:0] = m0[3:0];
endmodule
