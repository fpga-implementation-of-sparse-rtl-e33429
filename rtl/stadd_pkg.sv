// Shared types of the sparse tree adder.
//
// gp_t is the generate/propagate pair that every stage of the adder passes
// along: the initialization stage makes one per bit, the carry merge cells of
// the prefix tree combine two of them into the pair of a wider bit span, and
// the summation stage uses the per-bit pairs together with the group carries.
// GROUP is the width of one summation block; the tree delivers exactly one
// carry per GROUP bits, which is what makes the tree "sparse".
package stadd_pkg;

  // Generate and propagate of one bit or of a span of bits.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Bits per summation block, one group carry per block.
  localparam int unsigned GROUP = 4;

endpackage : stadd_pkg
