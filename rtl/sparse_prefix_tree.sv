// Prefix tree stage of the sparse tree adder.
//
// A network of carry merge (CM) cells that turns the per-bit generate and
// propagate pairs into carries, but only one carry per 4-bit summation block
// (plus the few carries the least significant block needs). For the default
// 32-bit word the network is:
//   row 1: 16 CM cells, each joins an odd bit with the bit below it
//          (spans [1:0], [3:2], ..., [31:30]);
//   row 2:  8 CM cells, each joins two row-1 spans into the 4-bit group pair
//          of bits [4j+3:4j] (at bits 3, 7, ..., 31);
//   rows 3-5: 12 CM cells that combine the 8 group pairs in divide-and-conquer
//          order: row 3 at groups 1,3,5,7 (bits 7,15,23,31), row 4 at groups
//          2,3,6,7 (bits 11,15,27,31), row 5 at groups 4..7 (bits 19..31).
// After row 5 the pair at group j covers bits [4j+3:0], so its G is the carry
// out of bit 4j+3, the carry into the next block; for the top group it is the
// adder's carry out. Thirty-six cells in all, five cell delays deep.
//
// The least significant block has no summation block of its own: its carries
// into bits 1, 2 and 3 are g[0], the row-1 span [1:0], and one extra CM cell
// that joins bit 2 with span [1:0] (only its generate output is used, so a
// lint tool reports its propagate as unused). That extra cell is this
// design's choice; the row structure above follows the published structure.
//
// For a WIDTH other than 32 (a multiple of 4, at least 8) the same pattern is
// generated: rows 1-2 inside each group, then $clog2(WIDTH/4) rows in which
// group j, when bit l of j is set, is joined with group ((j >> l) << l) - 1.
//
// Interface: gp[i] per-bit pairs in; grp_carry[j] = carry out of bit 4j+3;
// low_carry[k] = carry into bit k+1, k = 0..2. Purely combinational.
module sparse_prefix_tree
  import stadd_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  gp_t  [WIDTH-1:0]       gp,
  output logic [WIDTH/GROUP-1:0] grp_carry,
  output logic [2:0]             low_carry
);

  localparam int unsigned NG     = WIDTH / GROUP;  // number of 4-bit groups
  localparam int unsigned LEVELS = $clog2(NG);     // group-level rows

  if (WIDTH % GROUP != 0 || WIDTH < 2 * GROUP) begin : g_bad_width
    $error("sparse_prefix_tree: WIDTH must be a multiple of 4 and at least 8");
  end

  // Row 1: 2-bit spans [2k+1:2k].
  gp_t r1 [WIDTH/2];
  for (genvar k = 0; k < WIDTH / 2; k++) begin : g_row1
    carry_merge u_cm (.hi(gp[2*k+1]), .lo(gp[2*k]), .merged(r1[k]));
  end

  // Row 2: the pair of each 4-bit group, bits [4j+3:4j].
  gp_t grp0 [NG];
  for (genvar j = 0; j < NG; j++) begin : g_row2
    carry_merge u_cm (.hi(r1[2*j+1]), .lo(r1[2*j]), .merged(grp0[j]));
  end

  // Group rows. After row l, g_lvl[l].q[j] covers bits
  // [4j+3 : 4*(((j >> (l+1)) << (l+1)))], so after the last row every group
  // pair reaches down to bit 0.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    gp_t d [NG];  // pairs entering this row
    gp_t q [NG];  // pairs leaving this row
    if (l == 0) begin : g_first
      assign d = grp0;
    end else begin : g_next
      assign d = g_lvl[l-1].q;
    end
    for (genvar j = 0; j < NG; j++) begin : g_grp
      if (((j >> l) & 1) != 0) begin : g_cm
        localparam int unsigned SRC = ((j >> l) << l) - 1;
        carry_merge u_cm (.hi(d[j]), .lo(d[SRC]), .merged(q[j]));
      end else begin : g_pass
        assign q[j] = d[j];
      end
    end
  end

  for (genvar j = 0; j < NG; j++) begin : g_out
    assign grp_carry[j] = g_lvl[LEVELS-1].q[j].g;
  end

  // Carries inside the least significant group.
  gp_t span20;  // bits [2:0]
  carry_merge u_cm_low (.hi(gp[2]), .lo(r1[0]), .merged(span20));

  assign low_carry = {span20.g, r1[0].g, gp[0].g};

endmodule : sparse_prefix_tree
