// tb_budget_split: test of the budget split.
// Random budgets and random theta vectors summing to 1.0 (1024): checks
// each set point equals floor(theta_i * B / 1024), that they add up to at
// most B, and that outputs are registered one cycle after valid.
module tb_budget_split;
  localparam int unsigned NCPU = 4;
  logic clk = 0, rst = 1, valid = 0;
  logic [11:0] budget = '0;
  logic [NCPU-1:0][10:0] theta = '0;
  logic [NCPU-1:0][11:0] p_sp;
  logic out_valid;
  int checks = 0, failures = 0;

  budget_split #(.NCPU(NCPU)) dut (.clk, .rst, .valid, .budget, .theta, .p_sp, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 300; k++) begin
      int left, sum;
      left = 1024; sum = 0;
      for (int i = 0; i < NCPU - 1; i++) begin
        theta[i] = 11'($urandom % (left + 1));
        left -= int'(theta[i]);
      end
      theta[NCPU-1] = 11'(left);
      budget = 12'($urandom % 4001);
      valid = 1;
      @(negedge clk);
      valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: no out_valid"); end
      for (int i = 0; i < NCPU; i++) begin
        int e;
        e = (int'(budget) * int'(theta[i])) / 1024;
        sum += int'(p_sp[i]);
        checks++;
        if (int'(p_sp[i]) != e) begin
          failures++; $display("FAIL: core %0d sp=%0d expected %0d", i, p_sp[i], e);
        end
      end
      checks++;
      if (sum > int'(budget) || sum < int'(budget) - NCPU) begin
        failures++; $display("FAIL: set points add to %0d of %0d", sum, budget);
      end
      // hold: no valid, outputs unchanged
      budget = 12'($urandom % 4001);
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid without valid"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
