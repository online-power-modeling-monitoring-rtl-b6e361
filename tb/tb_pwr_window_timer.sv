// tb_pwr_window_timer: self-checking test of the sampling-window timer.
// Checks that win_end pulses exactly every T cycles, that cyc counts
// 0..T-1, and that model_rst restarts the window and suppresses win_end.
module tb_pwr_window_timer;
  localparam int unsigned T = 7;
  logic clk = 0, rst = 1, model_rst = 0;
  logic win_end;
  logic [$clog2(T+1)-1:0] cyc;
  int checks = 0, failures = 0;

  pwr_window_timer #(.T(T)) dut (.clk, .rst, .model_rst, .win_end, .cyc);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int ref_cyc;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    ref_cyc = 0;
    for (int n = 0; n < 5 * T; n++) begin
      @(negedge clk);
      check(cyc == ref_cyc, $sformatf("cyc %0d expected %0d", cyc, ref_cyc));
      check(win_end == (ref_cyc == T - 1), $sformatf("win_end at cyc %0d", ref_cyc));
      ref_cyc = (ref_cyc + 1) % T;
    end
    // model_rst in the middle of a window
    @(negedge clk); while (cyc != 3) @(negedge clk);
    model_rst = 1;
    check(!win_end, "no win_end during model_rst");
    @(negedge clk);
    check(cyc == 0, "model_rst clears cyc");
    check(!win_end, "no win_end during model_rst (2)");
    model_rst = 0;
    for (int n = 0; n < T; n++) begin
      check(cyc == n, $sformatf("after model_rst cyc %0d expected %0d", cyc, n));
      check(win_end == (n == T - 1), "win_end after model_rst");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
