// Self-checking testbench for gpr_block at its default 32-bit width.
// Drives directed and random operand pairs and checks, for every bit, that the
// generate output is set exactly where both operands are 1 and the propagate
// output exactly where they differ.
module tb_gpr_block;
  import stadd_pkg::gp_t;

  localparam int unsigned W = 32;

  logic [W-1:0] a, b;
  gp_t  [W-1:0] gp;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  gpr_block #(.WIDTH(W)) dut (.a(a), .b(b), .gp(gp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb);
    a = ta;
    b = tb;
    @(posedge clk);
    for (int i = 0; i < W; i++) begin
      logic want_g, want_p;
      want_g = (ta[i] == 1'b1) && (tb[i] == 1'b1);
      want_p = (ta[i] != tb[i]);
      checks++;
      if (gp[i].g !== want_g || gp[i].p !== want_p) begin
        failures++;
        $display("FAIL bit %0d a=%h b=%h: got (%b,%b) want (%b,%b)",
                 i, ta, tb, gp[i].g, gp[i].p, want_g, want_p);
      end
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, '0);
    check('0, '1);
    check(32'hAAAA_AAAA, 32'h5555_5555);
    check(32'hF0F0_F0F0, 32'hFF00_FF00);
    for (int n = 0; n < 200; n++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
