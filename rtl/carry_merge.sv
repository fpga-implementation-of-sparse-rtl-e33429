// Carry merge (CM) cell, the node of the prefix tree.
//
// It combines the generate/propagate pair of a bit span (hi) with the pair of
// the adjacent, less significant span (lo) into the pair of the joined span:
//   G = hi.g | (hi.p & lo.g)
//   P = hi.p & lo.p
// When lo reaches down to bit 0, G is the carry out of the joined span.
// Purely combinational, one AND-OR and one AND.
module carry_merge
  import stadd_pkg::gp_t;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t merged
);

  always_comb begin
    merged.g = hi.g | (hi.p & lo.g);
    merged.p = hi.p & lo.p;
  end

endmodule : carry_merge
