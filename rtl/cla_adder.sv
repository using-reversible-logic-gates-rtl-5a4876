// Carry lookahead adder: {cout, sum} = a + b, WIDTH-bit unsigned operands,
// carry in fixed at 0, purely combinational.
//
// Each bit forms a generate g = a & b and a propagate t = a ^ b. Every carry
// is computed directly from these signals as a two-level sum of products,
//   c[i+1] = g[i] | t[i] g[i-1] | t[i] t[i-1] g[i-2] | ...
// rather than rippling through the lower bits, and sum[i] = t[i] ^ c[i].
// This is the conventional (not reversible) alternative to rev_rca; the
// block diagrams label their adders "carry look ahead", while the reversible
// design builds them as HNG ripple adders. Select it with ut_pkg::ADDER_CLA.
module cla_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] g, t;
  logic [WIDTH:0]   c;

  assign g = a & b;
  assign t = a ^ b;

  always_comb begin
    c[0] = 1'b0;
    for (int i = 0; i < WIDTH; i++) begin
      logic term;
      c[i+1] = 1'b0;
      for (int j = 0; j <= i; j++) begin
        term = g[j];
        for (int k = j + 1; k <= i; k++) term = term & t[k];
        c[i+1] = c[i+1] | term;
      end
    end
  end

  assign sum  = t ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];
endmodule
