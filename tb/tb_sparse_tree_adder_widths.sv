// Checks the sparse tree adder at widths other than the default: 8 bits
// exhaustively (all 65536 operand pairs), and 16, 24 and 64 bits with
// directed and random operands. 16 and 64 bits have a power-of-two number of
// 4-bit groups, 24 bits has six groups, which exercises the irregular end of
// the group-level tree. Each result {cout, sum} is compared with integer
// addition.
module tb_sparse_tree_adder_widths;
  logic [63:0] a, b;
  logic [7:0]  s8;
  logic [15:0] s16;
  logic [23:0] s24;
  logic [63:0] s64;
  logic        c8, c16, c24, c64;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  sparse_tree_adder #(.WIDTH(8))  u8  (.a(a[7:0]),  .b(b[7:0]),  .sum(s8),  .cout(c8));
  sparse_tree_adder #(.WIDTH(16)) u16 (.a(a[15:0]), .b(b[15:0]), .sum(s16), .cout(c16));
  sparse_tree_adder #(.WIDTH(24)) u24 (.a(a[23:0]), .b(b[23:0]), .sum(s24), .cout(c24));
  sparse_tree_adder #(.WIDTH(64)) u64 (.a(a),       .b(b),       .sum(s64), .cout(c64));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] ta, input logic [63:0] tb, input bit only8);
    logic [8:0]  t8;
    logic [16:0] t16;
    logic [24:0] t24;
    logic [64:0] t64;
    a = ta;
    b = tb;
    @(posedge clk);
    t8  = {1'b0, ta[7:0]}  + {1'b0, tb[7:0]};
    t16 = {1'b0, ta[15:0]} + {1'b0, tb[15:0]};
    t24 = {1'b0, ta[23:0]} + {1'b0, tb[23:0]};
    t64 = {1'b0, ta}       + {1'b0, tb};
    checks++;
    if ({c8, s8} !== t8) begin
      failures++;
      $display("FAIL w8 %h+%h got %b_%h", ta[7:0], tb[7:0], c8, s8);
    end
    if (!only8) begin
      checks += 3;
      if ({c16, s16} !== t16) begin
        failures++;
        $display("FAIL w16 %h+%h got %b_%h", ta[15:0], tb[15:0], c16, s16);
      end
      if ({c24, s24} !== t24) begin
        failures++;
        $display("FAIL w24 %h+%h got %b_%h", ta[23:0], tb[23:0], c24, s24);
      end
      if ({c64, s64} !== t64) begin
        failures++;
        $display("FAIL w64 %h+%h got %b_%h", ta, tb, c64, s64);
      end
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        check(64'(x), 64'(y), 1'b1);
    check('1, 64'd1, 1'b0);
    check('1, '1, 1'b0);
    for (int i = 0; i < 64; i++) begin
      check('1, 64'd1 << i, 1'b0);
      check(~(64'd1 << i), 64'd1, 1'b0);
    end
    for (int n = 0; n < 5000; n++) check({$urandom, $urandom}, {$urandom, $urandom}, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
