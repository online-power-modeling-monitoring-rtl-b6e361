// tb_global_controller: test of the global energy-buffer controller.
// Feeds sequences of total power against a set point and checks slack and
// budget each epoch against an integer reference of
// S = clamp(S + K0*(SP - P), +/-2000 mW) and B = clamp(SP + S, 0, 4000).
// Covers an accumulating buffer, the +2 W and -2 W limits and both budget
// limits.
module tb_global_controller;
  logic clk = 0, rst = 1, valid = 0;
  logic [15:0] p_tot = '0, p_sp = '0;
  logic signed [12:0] slack;
  logic [11:0] budget;
  logic out_valid;
  int checks = 0, failures = 0;
  int n_s_hi = 0, n_s_lo = 0, n_b_hi = 0, n_b_lo = 0;

  global_controller dut (.clk, .rst, .valid, .p_tot, .p_sp, .slack, .budget, .out_valid);

  always #5 clk = ~clk;

  longint s = 0;
  localparam longint S_HI = 2000 * 65536;

  task automatic epoch(int p, int sp);
    longint s_int, b;
    s = s + 655 * (sp - p);
    if (s > S_HI) s = S_HI;
    if (s < -S_HI) s = -S_HI;
    s_int = s >>> 16;
    b = sp + s_int;
    if (b < 0) b = 0;
    if (b > 4000) b = 4000;
    if (s == S_HI) n_s_hi++;
    if (s == -S_HI) n_s_lo++;
    if (b == 4000) n_b_hi++;
    if (b == 0) n_b_lo++;
    p_tot = 16'(p); p_sp = 16'(sp); valid = 1;
    @(negedge clk);
    valid = 0;
    checks++;
    if (!out_valid || longint'(slack) != s_int || longint'(budget) != b) begin
      failures++;
      $display("FAIL: p=%0d sp=%0d slack=%0d (exp %0d) budget=%0d (exp %0d)", p, sp, slack, s_int, budget, b);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // under-use: the buffer fills until +2 W
    for (int k = 0; k < 1200; k++) epoch(100 + $urandom % 50, 3000);
    // over-use: drains to -2 W, budget hits 0
    for (int k = 0; k < 2000; k++) epoch(3500, 300);
    // moderate operation around the set point
    for (int k = 0; k < 300; k++) epoch(350 + $urandom % 100, 400);
    checks++;
    if (n_s_hi == 0 || n_s_lo == 0 || n_b_hi == 0 || n_b_lo == 0) begin
      failures++; $display("FAIL: limits not exercised %0d %0d %0d %0d", n_s_hi, n_s_lo, n_b_hi, n_b_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
