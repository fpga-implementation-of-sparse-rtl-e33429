// Self-checking testbench for the 4-bit carry skip adder.
// Runs every pair of 4-bit operands with both carry-in values (512 cases),
// forms the block's generate/propagate pairs from the operands, and compares
// sum and carry out with the integer sum a + b + cin. It also counts how often
// the skip path is exercised (all four bits propagate) with each carry in,
// and fails if either case never occurred.
module tb_carry_skip_adder;
  import stadd_pkg::gp_t;

  localparam int unsigned N = 4;

  gp_t  [N-1:0] gp;
  logic         cin;
  logic [N-1:0] sum;
  logic         cout;
  int   checks = 0, failures = 0;
  int   skip_cin0 = 0, skip_cin1 = 0;
  logic clk = 1'b0;

  carry_skip_adder #(.N(N)) dut (.gp(gp), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 16; va++) begin
      for (int vb = 0; vb < 16; vb++) begin
        for (int vc = 0; vc < 2; vc++) begin
          int total;
          for (int k = 0; k < N; k++) begin
            gp[k].g = va[k] & vb[k];
            gp[k].p = va[k] ^ vb[k];
          end
          cin = vc[0];
          @(posedge clk);
          total = va + vb + vc;
          if ((va ^ vb) == 15) begin
            if (vc == 0) skip_cin0++;
            else skip_cin1++;
          end
          checks++;
          if (sum !== total[3:0] || cout !== total[4]) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got cout=%b sum=%h want %0d",
                     va, vb, vc, cout, sum, total);
          end
        end
      end
    end
    checks++;
    if (skip_cin0 == 0 || skip_cin1 == 0) begin
      failures++;
      $display("FAIL skip path not exercised (%0d, %0d)", skip_cin0, skip_cin1);
    end
    $display("skip path used: %0d times with cin=0, %0d with cin=1", skip_cin0, skip_cin1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
