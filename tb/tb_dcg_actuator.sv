// tb_dcg_actuator: test of the dynamic clock gating actuator.
// Sends a control action a few cycles into each epoch (as the controller
// does) and checks that exactly that many cycles at the end of the epoch
// have clk_en low, that the gated clock gclk shows no rising edge in those
// cycles and one in every other cycle, that gated_cycles reports the
// count, and covers the 0 and 99-cycle extremes. Until the new action has
// been stored (cycles 0..3 here) the previous action still applies, so an
// action that would mask those cycles takes full effect from the next
// epoch on.
module tb_dcg_actuator;
  localparam int unsigned TP = 100;
  logic clk = 0, rst = 1, model_rst = 0, act_valid = 0;
  logic [6:0] act = '0;
  logic [$clog2(TP+1)-1:0] cyc;
  logic win_end, clk_en, gclk;
  logic [6:0] gated_cycles;
  int checks = 0, failures = 0;

  pwr_window_timer #(.T(TP)) u_t (.clk, .rst, .model_rst, .win_end, .cyc);
  dcg_actuator #(.TP(TP)) dut (.clk, .rst, .cyc, .act_valid, .act, .clk_en, .gclk, .gated_cycles);

  always #5 clk = ~clk;

  int gedges = 0;
  always @(posedge gclk) gedges++;

  int actions [$] = '{0, 10, 37, 99, 99, 50, 1, 0, 75};
  int a_prev = 0, exact = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // align to the start of an epoch
    while (cyc != 0) @(negedge clk);
    foreach (actions[k]) begin
      int off, g0, exp_off, a;
      off = 0;
      exp_off = 0;
      g0 = gedges;
      for (int c = 0; c < TP; c++) begin
        // the new action arrives at cycle 3 of the epoch
        act_valid = (c == 3);
        act = 7'(actions[k]);
        a = (c <= 3) ? a_prev : actions[k];
        if (!clk_en) off++;
        if (a > 0 && c >= TP - a) exp_off++;
        checks++;
        if (clk_en != !(a > 0 && c >= TP - a)) begin
          failures++; $display("FAIL: action %0d cycle %0d clk_en=%0b", actions[k], c, clk_en);
        end
        @(negedge clk);
      end
      act_valid = 0;
      checks += 3;
      if (off != exp_off) begin failures++; $display("FAIL: %0d gated cycles, expected %0d", off, exp_off); end
      if (int'(gated_cycles) != exp_off) begin failures++; $display("FAIL: gated_cycles=%0d expected %0d", gated_cycles, exp_off); end
      if (gedges - g0 != TP - exp_off) begin failures++; $display("FAIL: %0d gated clock edges, expected %0d", gedges - g0, TP - exp_off); end
      if (exp_off == actions[k]) exact++;
      a_prev = actions[k];
    end
    checks++;
    if (exact < 7) begin failures++; $display("FAIL: only %0d epochs with the exact action", exact); end
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
