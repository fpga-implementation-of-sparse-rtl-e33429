// End-to-end testbench for the sparse tree adder at its default 32-bit width.
// The adder is instantiated with no parameter overrides. Directed corner
// cases and random operands are applied; {cout, sum} must equal the 33-bit
// integer sum a + b. From the operands alone it also counts how often each
// carry mechanism of the adder was exercised and fails if one never was:
//   skip     a 4-bit block with every bit propagating and carry in 1, so the
//            carry passes the block through its skip multiplexer;
//   kill     a carry into a block that the block stops (block carry out 0);
//   generate a block that makes a carry with carry in 0;
//   ripple   a carry made inside the lowest block that reaches bit 3;
//   long     a carry from bit 0 that travels to the carry out;
//   cout     carry out set.
// The adder is combinational with no clock: each result is checked one time
// unit after the operands change, with no clock edge in between, which checks
// that it takes zero cycles. The clock only drives the watchdog.
module tb_sparse_tree_adder;
  localparam int unsigned W  = 32;
  localparam int unsigned NG = W / 4;

  logic [W-1:0] a, b, sum;
  logic         cout;
  int   checks = 0, failures = 0;
  int   n_skip = 0, n_kill = 0, n_gen = 0, n_ripple = 0, n_long = 0, n_cout = 0;
  logic clk = 1'b0;

  sparse_tree_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carry out of bit k of x + y.
  function automatic logic carry_out(input logic [W-1:0] x, input logic [W-1:0] y, input int k);
    logic [W:0] mask, s;
    mask = ((W+1)'(1) << (k + 1)) - (W+1)'(1);
    s = ({1'b0, x} & mask) + ({1'b0, y} & mask);
    return s[k+1];
  endfunction

  task automatic count_mechanisms(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W-1:0] p, g;
    p = x ^ y;
    g = x & y;
    for (int j = 1; j < NG; j++) begin
      logic cin, cblk;
      cin  = carry_out(x, y, 4*j - 1);
      cblk = carry_out(x, y, 4*j + 3);
      if (cin && p[4*j +: 4] == 4'hF) n_skip++;
      if (cin && !cblk) n_kill++;
      if (!cin && cblk) n_gen++;
    end
    if (g[0] && p[1] && p[2]) n_ripple++;
    if (g[0] && p[W-1:1] == '1) n_long++;
    if (carry_out(x, y, W-1)) n_cout++;
  endtask

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb);
    logic [W:0] total;
    a = ta;
    b = tb;
    #1;
    total = {1'b0, ta} + {1'b0, tb};
    count_mechanisms(ta, tb);
    checks++;
    if ({cout, sum} !== total) begin
      failures++;
      $display("FAIL %h + %h: got %b_%h want %b_%h", ta, tb, cout, sum, total[W], total[W-1:0]);
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("%-8s exercised %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL %s never exercised", what);
    end
  endtask

  initial begin
    a = '0;
    b = '0;
    check('0, '0);
    check('1, '0);
    check('1, '1);
    check('1, 32'd1);                  // carry from bit 0 to cout
    check(32'h7FFF_FFFF, 32'd1);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'hAAAA_AAAA, 32'h5555_5555);
    check(32'hAAAA_AAAB, 32'h5555_5555);
    for (int i = 0; i < W; i++) begin
      check('1, 32'd1 << i);           // carry entering at bit i
      check(~(32'd1 << i), 32'd1);     // carry from bit 0 stopped at bit i
      check(32'd1 << i, 32'd1 << i);   // single generate
    end
    // Every carry-in/propagate pattern of each block over random context.
    for (int j = 0; j < NG; j++) begin
      for (int v = 0; v < 256; v++) begin
        logic [W-1:0] ra, rb;
        ra = $urandom;
        rb = $urandom;
        ra[4*j +: 4] = v[3:0];
        rb[4*j +: 4] = v[7:4];
        check(ra, rb);
      end
    end
    for (int n = 0; n < 20000; n++) check($urandom, $urandom);

    need("skip", n_skip);
    need("kill", n_kill);
    need("generate", n_gen);
    need("ripple", n_ripple);
    need("long", n_long);
    need("cout", n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
