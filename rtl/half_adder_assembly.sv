// Half adder assembly: y = x + inc (mod 2^WIDTH), a WIDTH-bit value plus a
// 2-bit count that is 0, 1 or 2 (never 3), purely combinational. In the 8x8
// multiplier x is the upper nibble of the high 4x4 product and y is P15..P12.
//
// It is a chain of Peres half adders (c = 0: q = sum, r = carry). Bit 0 adds
// inc[0]. Bit 1 must add both inc[1] and the carry out of bit 0; that carry
// can only be 1 when inc[0] is 1, and inc[0] and inc[1] are never 1 together,
// so the two are merged exactly by one Feynman gate (XOR) and a half adder
// still suffices. Higher bits add the rippling carry. The carry out of the
// top bit is dropped: an 8x8 product fits in 16 bits, so it is always 0
// there. The name and position of the block follow the reference block
// diagram; its gate-level structure is this design's own.
module half_adder_assembly #(
  parameter int unsigned WIDTH = 4  // at least 2
) (
  input  logic [WIDTH-1:0] x,
  input  logic [1:0]       inc,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH:1]   carry;
  logic [WIDTH-1:1] addend;
  logic [WIDTH:0]   garbage;

  peres_gate ha0 (.a(x[0]), .b(inc[0]), .c(1'b0),
                  .p(garbage[0]), .q(y[0]), .r(carry[1]));
  feynman_gate merge (.a(carry[1]), .b(inc[1]),
                      .p(garbage[WIDTH]), .q(addend[1]));

  for (genvar i = 2; i < WIDTH; i++) begin : g_add
    assign addend[i] = carry[i];
  end

  for (genvar i = 1; i < WIDTH; i++) begin : g_ha
    peres_gate ha (.a(x[i]), .b(addend[i]), .c(1'b0),
                   .p(garbage[i]), .q(y[i]), .r(carry[i+1]));
  end
endmodule
