// Summation stage of the sparse tree adder.
//
// Every 4-bit block above the lowest has its own carry skip adder, whose carry
// in is the group carry the prefix tree computed for the block below
// (grp_carry[j-1] feeds block j). The lowest block needs no adder: its carry
// in is 0, so its sums are p xor the carries the tree supplies for bits 1..3.
// Since the carry into every block is known from the tree, the blocks work in
// parallel and no carry ripples from block to block. The skip multiplexers'
// carry outs are not needed for the sum; an assertion checks that each equals
// the tree's group carry for that block.
//
// Interface: gp per-bit pairs, grp_carry[j] = carry out of bit 4j+3,
// low_carry[k] = carry into bit k+1; sum is the WIDTH-bit result. Purely
// combinational. One carry skip adder per upper block follows the adder's
// published structure; forming the lowest block from the tree's carries
// follows its drawing, where that block has no adder.
module summation_stage
  import stadd_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  gp_t  [WIDTH-1:0]       gp,
  input  logic [WIDTH/GROUP-1:0] grp_carry,
  input  logic [2:0]             low_carry,
  output logic [WIDTH-1:0]       sum
);

  localparam int unsigned NG = WIDTH / GROUP;

  // Lowest block: carry in 0.
  always_comb begin
    sum[0] = gp[0].p;
    for (int unsigned k = 1; k < GROUP; k++) begin
      sum[k] = gp[k].p ^ low_carry[k-1];
    end
  end

  // Each block's skip multiplexer must agree with the tree: the carry out of
  // block j is the group carry grp_carry[j] (for the top block, the adder's
  // carry out). The check ties the two carry paths together in simulation.
  for (genvar j = 1; j < NG; j++) begin : g_blk
    logic skip_cout;
    carry_skip_adder #(.N(GROUP)) u_csa (
      .gp   (gp[GROUP*j +: GROUP]),
      .cin  (grp_carry[j-1]),
      .sum  (sum[GROUP*j +: GROUP]),
      .cout (skip_cout)
    );
    always_comb begin
      a_skip_matches_tree : assert (skip_cout == grp_carry[j])
        else $error("block %0d: skip carry %b, tree carry %b", j, skip_cout, grp_carry[j]);
    end
  end

endmodule : summation_stage
