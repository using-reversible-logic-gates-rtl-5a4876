// Shared types for the Urdhva Tiryakbhayam (vertical-and-crosswise) multiplier.
//
// adder_kind_e selects how the multi-bit additions inside the 4x4 and 8x8
// multipliers are built. ADDER_RCA is the reversible ripple carry adder made
// of one Peres half adder and HNG full adders, the adder the design is built
// around. ADDER_CLA is a conventional carry lookahead adder, the adder named
// on the block diagrams; it is offered as an alternative for comparison.
package ut_pkg;

  typedef enum logic [0:0] {
    ADDER_RCA = 1'b0,
    ADDER_CLA = 1'b1
  } adder_kind_e;

endpackage
