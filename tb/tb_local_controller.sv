// tb_local_controller: test of the local (per-core) control loop.
// Closes the loop around a plant model of a clock-gated core,
// P = P_STATIC + P_DYN * (TP - A_prev) / TP, and checks every control
// action against a reference model of the filter and PI equations.
// Then checks the loop behaviour: the power settles within 3 mW of a
// reachable set point, the action stays at 0 when the set point is above
// the core's full power, reaches the 99-cycle limit when the set point is
// unreachable, and drops to 0 when the core becomes inactive.
// A set point step must settle within 15 epochs (30 us at 2 us per epoch,
// the response time the loop was designed for); this plant takes 8.
module tb_local_controller;
  localparam int unsigned TP = 100;
  localparam int KC = 102, Z0 = 82, P1 = 128;
  localparam int P_STATIC = 10, P_DYN = 120;

  logic clk = 0, rst = 1, active = 1, p_valid = 0;
  logic [11:0] p_meas = '0, p_sp = 12'd80;
  logic [6:0] act;
  logic act_valid;
  int checks = 0, failures = 0;
  int n_settle = 0, n_sat_hi = 0, n_sat_lo = 0;

  local_controller #(.TP(TP), .KC(KC), .Z0(Z0), .P1(P1)) dut (
    .clk, .rst, .active, .p_valid, .p_meas, .p_sp, .act, .act_valid);

  always #5 clk = ~clk;

  longint pf = 0, e_prev = 0, c = 0;
  int a_applied = 0;

  task automatic epoch(output int p, output int a_ref);
    longint e, de, dc;
    p = P_STATIC + (P_DYN * (int'(TP) - a_applied)) / int'(TP);
    // reference
    if (active) begin
      pf = (P1 * pf + (256 - P1) * (longint'(p) <<< 8)) >>> 8;
      e  = pf - (longint'(p_sp) <<< 8);
      de = e - ((Z0 * e_prev) >>> 8);
      dc = (KC * de) >>> 8;
      c  = c + dc;
      if (c < 0) c = 0;
      if (c > ((TP - 1) << 8)) c = (TP - 1) << 8;
      e_prev = e;
      a_ref = int'(c >>> 8);
    end else begin
      pf = 0; e_prev = 0; c = 0; a_ref = 0;
    end
    p_meas = 12'(p);
    p_valid = 1;
    @(negedge clk);
    p_valid = 0;
    checks++;
    if (!act_valid || int'(act) != a_ref) begin
      failures++;
      $display("FAIL: p=%0d sp=%0d act=%0d expected %0d", p, p_sp, act, a_ref);
    end
    a_applied = int'(act);
    repeat (3) @(negedge clk);
  endtask

  int p, a;
  int last_out;
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // reachable set point
    p_sp = 12'd80;
    last_out = -1;
    for (int k = 0; k < 40; k++) begin
      epoch(p, a);
      if (p < 77 || p > 83) last_out = k;
    end
    $display("step to 80 mW settles within 3 mW after %0d epochs", last_out + 1);
    checks++;
    if (last_out + 1 > 15) begin failures++; $display("FAIL: settling took %0d epochs", last_out + 1); end
    checks++;
    if (p < 77 || p > 83) begin failures++; $display("FAIL: no settling, p=%0d", p); end
    else n_settle++;
    // set point above the full power: no throttling
    p_sp = 12'd400;
    repeat (40) epoch(p, a);
    checks++;
    if (a != 0) begin failures++; $display("FAIL: action %0d with ample budget", a); end
    else n_sat_lo++;
    // unreachable set point: action limited to TP-1
    p_sp = 12'd5;
    repeat (60) epoch(p, a);
    checks++;
    if (a != TP - 1) begin failures++; $display("FAIL: action %0d not at limit", a); end
    else n_sat_hi++;
    // another reachable point from saturation
    p_sp = 12'd50;
    repeat (40) epoch(p, a);
    checks++;
    if (p < 47 || p > 53) begin failures++; $display("FAIL: no settling at 50, p=%0d", p); end
    // core becomes inactive
    active = 0;
    epoch(p, a);
    checks++;
    if (act != 0) begin failures++; $display("FAIL: inactive core throttled"); end
    $display("settled=%0d low_sat=%0d high_sat=%0d", n_settle, n_sat_lo, n_sat_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
