// Reversible ripple carry adder: {cout, sum} = a + b, WIDTH-bit unsigned
// operands, purely combinational.
//
// Bit 0 has no carry in, so its full adder reduces to a half adder: a Peres
// gate with c = 0 (q = sum, r = carry). Every higher bit is an HNG gate with
// d = 0 acting as a full adder (r = sum, s = carry), and the carry ripples
// from bit 0 upwards, as in the classic 4-bit ripple carry adder diagram.
// The adder therefore uses one Peres gate and WIDTH-1 HNG gates. There is
// deliberately no carry input: every adder in the multiplier starts from 0.
// Garbage outputs (the pass-through lines of each gate) are left unused.
module rev_rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0]   carry;
  logic [2*WIDTH-2:0] garbage;

  peres_gate ha0 (.a(a[0]), .b(b[0]), .c(1'b0),
                  .p(garbage[0]), .q(sum[0]), .r(carry[1]));
  assign carry[0] = 1'b0;

  for (genvar i = 1; i < WIDTH; i++) begin : g_fa
    hng_gate fa (.a(a[i]), .b(b[i]), .c(carry[i]), .d(1'b0),
                 .p(garbage[2*i-1]), .q(garbage[2*i]),
                 .r(sum[i]), .s(carry[i+1]));
  end

  assign cout = carry[WIDTH];
endmodule
