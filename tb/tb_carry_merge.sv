// Self-checking testbench for carry_merge.
// Applies all 16 combinations of the two input pairs and compares the merged
// pair with the prefix operator worked out here from its definition: the
// joined span generates if the upper span generates, or propagates a carry the
// lower span generates; it propagates only if both spans propagate.
module tb_carry_merge;
  import stadd_pkg::gp_t;

  gp_t hi, lo, merged;
  int  checks = 0, failures = 0;
  logic clk = 1'b0;

  carry_merge dut (.hi(hi), .lo(lo), .merged(merged));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {hi.g, hi.p, lo.g, lo.p} = v[3:0];
      @(posedge clk);
      // upper generates, or upper propagates and lower generates
      exp_g = (v[3] == 1'b1) || (v[2] == 1'b1 && v[1] == 1'b1);
      exp_p = (v[2] == 1'b1) && (v[0] == 1'b1);
      checks++;
      if (merged.g !== exp_g || merged.p !== exp_p) begin
        failures++;
        $display("FAIL hi=(%b,%b) lo=(%b,%b): got (%b,%b) want (%b,%b)",
                 hi.g, hi.p, lo.g, lo.p, merged.g, merged.p, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
