// Self-checking testbench for the sparse prefix tree.
// Three trees are built: the default 32-bit one, a 24-bit one (six groups, not
// a power of two) and an 8-bit one. For each operand pair the testbench forms
// the per-bit pairs, then compares every group carry and each low carry with
// the carry obtained by adding the operands' low bits as integers: the carry
// out of bit k is bit k+1 of a[k:0] + b[k:0].
module tb_sparse_prefix_tree;
  import stadd_pkg::*;

  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  logic [31:0] a, b;

  gp_t  [31:0] gp32;
  logic [7:0]  gc32;
  logic [2:0]  lc32;
  gp_t  [23:0] gp24;
  logic [5:0]  gc24;
  logic [2:0]  lc24;
  gp_t  [7:0]  gp8;
  logic [1:0]  gc8;
  logic [2:0]  lc8;

  always_comb begin
    for (int i = 0; i < 32; i++) begin
      gp32[i].g = a[i] & b[i];
      gp32[i].p = a[i] ^ b[i];
    end
    gp24 = gp32[23:0];
    gp8  = gp32[7:0];
  end

  sparse_prefix_tree #(.WIDTH(32)) dut32 (.gp(gp32), .grp_carry(gc32), .low_carry(lc32));
  sparse_prefix_tree #(.WIDTH(24)) dut24 (.gp(gp24), .grp_carry(gc24), .low_carry(lc24));
  sparse_prefix_tree #(.WIDTH(8))  dut8  (.gp(gp8),  .grp_carry(gc8),  .low_carry(lc8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carry out of bit k of a + b.
  function automatic logic carry_out(input logic [31:0] x, input logic [31:0] y, input int k);
    logic [32:0] mask, s;
    mask = (33'd1 << (k + 1)) - 33'd1;
    s = ({1'b0, x} & mask) + ({1'b0, y} & mask);
    return s[k+1];
  endfunction

  task automatic check(input logic [31:0] ta, input logic [31:0] tb);
    a = ta;
    b = tb;
    @(posedge clk);
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (gc32[j] !== carry_out(ta, tb, 4*j+3)) begin
        failures++;
        $display("FAIL w32 group %0d a=%h b=%h got %b", j, ta, tb, gc32[j]);
      end
    end
    for (int j = 0; j < 6; j++) begin
      checks++;
      if (gc24[j] !== carry_out(ta, tb, 4*j+3)) begin
        failures++;
        $display("FAIL w24 group %0d a=%h b=%h got %b", j, ta, tb, gc24[j]);
      end
    end
    for (int j = 0; j < 2; j++) begin
      checks++;
      if (gc8[j] !== carry_out(ta, tb, 4*j+3)) begin
        failures++;
        $display("FAIL w8 group %0d a=%h b=%h got %b", j, ta, tb, gc8[j]);
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (lc32[k] !== carry_out(ta, tb, k) || lc24[k] !== lc32[k] || lc8[k] !== lc32[k]) begin
        failures++;
        $display("FAIL low carry %0d a=%h b=%h got %b %b %b", k, ta, tb, lc32[k], lc24[k], lc8[k]);
      end
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 32'd1);           // carry runs through every group
    check(32'h7FFF_FFFF, 32'd1);
    check(32'h8000_0000, 32'h8000_0000);
    // A carry entering at bit i of an all-ones word runs to the top; a single
    // killing bit stops a carry from bit 0.
    for (int i = 0; i < 32; i++) check('1, 32'd1 << i);
    for (int i = 0; i < 32; i++) check(~(32'd1 << i), 32'd1);
    for (int n = 0; n < 2000; n++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
