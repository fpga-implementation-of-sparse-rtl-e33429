// Initialization stage of the sparse tree adder (the "GP" row).
//
// For every bit position it forms the prefix signals of the two operands:
//   generate  g = a & b   (the bit produces a carry by itself)
//   propagate p = a ^ b   (the bit passes an incoming carry on)
// The propagate is the half-sum, so the summation stage later reuses it to form
// sum = p ^ carry. Purely combinational, one AND and one XOR per bit.
//
// Interface: a, b are the WIDTH-bit operands; gp[i] is the pair of bit i.
// The equations are the ones the adder is defined by; packaging the pair as a
// struct is this design's choice.
module gpr_block
  import stadd_pkg::gp_t;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output gp_t  [WIDTH-1:0] gp
);

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      gp[i].g = a[i] & b[i];
      gp[i].p = a[i] ^ b[i];
    end
  end

endmodule : gpr_block
