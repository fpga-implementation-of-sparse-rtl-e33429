// Self-checking testbench for the summation stage at 32 bits.
// The group carries and low carries it needs are computed here from integer
// addition of the operands' low bits, so the stage is tested on its own,
// without the prefix tree. The sum must equal the low 32 bits of a + b.
// It counts blocks whose carry in is 1 and whose four bits all propagate, the
// case that uses the skip multiplexer, and fails if that never happened.
module tb_summation_stage;
  import stadd_pkg::*;

  localparam int unsigned W  = 32;
  localparam int unsigned NG = W / GROUP;

  logic [W-1:0]  a, b, sum;
  gp_t  [W-1:0]  gp;
  logic [NG-1:0] grp_carry;
  logic [2:0]    low_carry;
  int   checks = 0, failures = 0, skips = 0;
  logic clk = 1'b0;

  summation_stage #(.WIDTH(W)) dut (
    .gp(gp), .grp_carry(grp_carry), .low_carry(low_carry), .sum(sum)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic carry_out(input logic [W-1:0] x, input logic [W-1:0] y, input int k);
    logic [W:0] mask, s;
    mask = ((W+1)'(1) << (k + 1)) - (W+1)'(1);
    s = ({1'b0, x} & mask) + ({1'b0, y} & mask);
    return s[k+1];
  endfunction

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb);
    logic [W:0] total;
    a = ta;
    b = tb;
    for (int i = 0; i < W; i++) begin
      gp[i].g = ta[i] & tb[i];
      gp[i].p = ta[i] ^ tb[i];
    end
    for (int j = 0; j < NG; j++) grp_carry[j] = carry_out(ta, tb, GROUP*j + GROUP - 1);
    for (int k = 0; k < 3; k++) low_carry[k] = carry_out(ta, tb, k);
    for (int j = 1; j < NG; j++)
      if (grp_carry[j-1] && ((ta ^ tb) >> (GROUP*j) & 4'hF) == 4'hF) skips++;
    @(posedge clk);
    total = {1'b0, ta} + {1'b0, tb};
    checks++;
    if (sum !== total[W-1:0]) begin
      failures++;
      $display("FAIL a=%h b=%h got %h want %h", ta, tb, sum, total[W-1:0]);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, 32'd1);
    check('1, '1);
    check(32'h0F0F_0F0F, 32'h0101_0101);
    for (int n = 0; n < 3000; n++) check($urandom, $urandom);
    checks++;
    if (skips == 0) begin
      failures++;
      $display("FAIL skip case never exercised");
    end
    $display("skip cases: %0d", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
