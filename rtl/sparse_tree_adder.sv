// Sparse tree adder, top level.
//
// A parallel-prefix adder that computes carries only at 4-bit boundaries.
// Three stages, all combinational:
//   1. gpr_block: per-bit generate g = a & b and propagate p = a ^ b;
//   2. sparse_prefix_tree: a Kogge-Stone-like carry merge network, but pruned
//      so that it produces just one group carry per 4-bit block (36 merge
//      cells and five cell delays for 32 bits, instead of one carry per bit);
//   3. summation_stage: a 4-bit carry skip adder per block, started by the
//      group carry of the block below, so all blocks finish in parallel.
// The carry out of the top group is the adder's carry out.
//
// Interface: a, b are the operands, sum = (a + b) mod 2^WIDTH, cout the carry
// out. There is no carry in, no clock and no reset: the result is valid one
// combinational delay after the operands. WIDTH defaults to 32, the main
// configuration; any multiple of 4 from 8 upwards elaborates. The stage
// structure follows the published design; having no carry in is read from its
// drawing, whose only ports are A, B, SUM and COUT.
module sparse_tree_adder
  import stadd_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  gp_t  [WIDTH-1:0]       gp;
  logic [WIDTH/GROUP-1:0] grp_carry;
  logic [2:0]             low_carry;

  gpr_block #(.WIDTH(WIDTH)) u_init (
    .a  (a),
    .b  (b),
    .gp (gp)
  );

  sparse_prefix_tree #(.WIDTH(WIDTH)) u_tree (
    .gp        (gp),
    .grp_carry (grp_carry),
    .low_carry (low_carry)
  );

  summation_stage #(.WIDTH(WIDTH)) u_sum (
    .gp        (gp),
    .grp_carry (grp_carry),
    .low_carry (low_carry),
    .sum       (sum)
  );

  assign cout = grp_carry[WIDTH/GROUP-1];

endmodule : sparse_tree_adder
