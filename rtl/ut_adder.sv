// Adder selector used inside the 4x4 and 8x8 multipliers: {cout, sum} = a + b
// with no carry in. ADDER chooses the reversible HNG ripple carry adder
// (rev_rca, the default) or the carry lookahead adder (cla_adder); both give
// identical results, only their structure and delay differ. Combinational.
module ut_adder
  import ut_pkg::*;
#(
  parameter int unsigned WIDTH = 4,
  parameter adder_kind_e ADDER = ADDER_RCA
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  if (ADDER == ADDER_CLA) begin : g_cla
    cla_adder #(.WIDTH(WIDTH)) u_add (.a(a), .b(b), .sum(sum), .cout(cout));
  end else begin : g_rca
    rev_rca   #(.WIDTH(WIDTH)) u_add (.a(a), .b(b), .sum(sum), .cout(cout));
  end
endmodule
