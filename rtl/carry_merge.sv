// Carry merge for the 8x8 multiplier: cnt = c1 + c2, two 1-bit carries in,
// a 2-bit count out, purely combinational.
//
// The two 8-bit adders of the 8x8 multiplier each produce a carry of weight
// 2^12, and both can be 1 at once (for example 111 * 222). The block diagram
// joins them with a 2-input OR gate; an OR would lose one carry in that case,
// so this block counts them instead: a single Peres gate with c = 0 gives
// cnt[0] = c1 ^ c2 and cnt[1] = c1 & c2. cnt is never 3.
module carry_merge (
  input  logic       c1,
  input  logic       c2,
  output logic [1:0] cnt
);
  logic c1_pass_unused;

  peres_gate ha (.a(c1), .b(c2), .c(1'b0),
                 .p(c1_pass_unused), .q(cnt[0]), .r(cnt[1]));
endmodule
