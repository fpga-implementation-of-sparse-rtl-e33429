// Carry skip adder for one summation block of the sparse tree adder.
//
// A ripple carry chain runs through the N bits of the block, starting from the
// group carry cin that the prefix tree delivers:
//   c0 = cin, c(k+1) = g[k] | (p[k] & c(k)), sum[k] = p[k] ^ c(k).
// An AND of the N propagates detects that the whole block passes a carry on;
// the skip multiplexer then forwards cin straight to cout instead of waiting
// for the ripple chain. The ripple chain, the AND and the multiplexer are the
// parts a carry skip adder is built from; taking the bit pairs g/p from the
// initialization stage rather than the raw operands is this design's choice.
//
// Interface: gp[k] is the pair of bit k of the block, cin the group carry,
// sum the N sum bits, cout the block carry out. Purely combinational. In the
// sparse tree adder cout is left unused, because the tree already supplies
// the carry of the next block.
module carry_skip_adder
  import stadd_pkg::*;
#(
  parameter int unsigned N = GROUP
) (
  input  gp_t  [N-1:0] gp,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic ripple_cout; // carry out of the ripple chain
  logic all_prop;    // every bit of the block propagates

  always_comb begin
    logic c;  // carry entering the current bit
    c        = cin;
    all_prop = 1'b1;
    for (int unsigned k = 0; k < N; k++) begin
      sum[k]   = gp[k].p ^ c;
      c        = gp[k].g | (gp[k].p & c);
      all_prop = all_prop & gp[k].p;
    end
    ripple_cout = c;
  end

  // Skip multiplexer.
  assign cout = all_prop ? cin : ripple_cout;

endmodule : carry_skip_adder
