// tb_pwr_mgmt_top: end-to-end test of the power management system at its
// default configuration (4 cores, 100-cycle epochs, 32-epoch dwell).
//
// Four behavioural cores (tb_core_model) run on the gated clocks the
// design produces, so throttling really removes switching activity and
// committed instructions. The test drives a scenario through the register
// bus the way an OS would:
//   1. busy cores under the reset set point (400 mW), then 200 mW: the
//      local loops throttle and the global loop drives the average total
//      power to the set point; the supervisor balances the utility of the
//      throttled cores, which run different instruction mixes;
//   2. one core switches to a light application that limits itself
//      (balanced class), then the OS imposes theta on another core
//      (forced class), then one core finishes (idle class);
//   3. a set point far above the demand saturates the global correction
//      and the total budget; a model_rst restarts every window; a low set
//      point drives the correction negative.
// Independent checks, every epoch: each core's power estimate against a
// reference computed from the probe toggles; the clock gating mask (the
// last A cycles of an epoch, contiguous, gated clock low while clk is low
// and high only on enabled edges); the global correction and budget
// against a reference integrator; the set points against theta * budget;
// sum(theta) = 1; register reads against the design's outputs. Every
// mechanism is counted and one that never happened counts a failure.
// Timing checked: estimates valid in cycle t+2 for an epoch ending at t.
module tb_pwr_mgmt_top;
  import pwr_pkg::*;

  localparam int unsigned NCPU = 4;
  localparam int unsigned TP   = 100;
  localparam int unsigned DW   = 32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic model_rst = 1'b0;
  logic [NCPU-1:0][40:0] core_probes;
  logic [NCPU-1:0][1:0]  core_commit;
  logic [NCPU-1:0]       core_active;
  logic [NCPU-1:0]       core_clk_en, core_gclk;
  logic [NCPU-1:0][6:0]  core_act;
  logic [NCPU-1:0][11:0] core_power, core_sp;
  logic [15:0]           total_power;
  logic [11:0]           total_budget;
  logic        req = 1'b0, we = 1'b0;
  logic [7:0]  addr = '0;
  logic [31:0] wdata = '0;
  logic [31:0] rdata;
  logic        ack;

  int unsigned intensity [NCPU];
  int unsigned mix [NCPU];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pwr_mgmt_top dut (
    .clk(clk), .rst(rst), .model_rst(model_rst),
    .core_probes(core_probes), .core_commit(core_commit), .core_active(core_active),
    .core_clk_en(core_clk_en), .core_gclk(core_gclk), .core_act(core_act),
    .core_power(core_power), .core_sp(core_sp), .total_power(total_power),
    .total_budget(total_budget),
    .req(req), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata), .ack(ack)
  );

  for (genvar i = 0; i < NCPU; i++) begin : g_core
    tb_core_model u_core (
      .clk(clk), .clk_en(core_clk_en[i]), .gclk(core_gclk[i]), .active(core_active[i]),
      .intensity(intensity[i]), .mix(mix[i]), .probes(core_probes[i]), .commit(core_commit[i])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int m_gate = 0, m_gate_deep = 0, m_track = 0, m_slack_pos = 0, m_slack_neg = 0;
  int m_slack_sat = 0, m_budget_clamp = 0, m_balance = 0, m_balanced = 0, m_reclaim = 0;
  int m_forced = 0, m_idle = 0, m_sp_write = 0, m_model_rst = 0, m_bus_read = 0;
  int m_est = 0, m_util_gap = 0;

  // ------------------------------------------------------------ power reference
  // Default model: data (32 bits, bit toggles * 2^-6 mW), control (8 bits,
  // changed cycles * 2^-1 mW), flag (changed cycles * 2^-2 mW), plus 10 mW.
  int unsigned acc_h [NCPU], acc_c [NCPU], acc_f [NCPU];
  logic [NCPU-1:0][40:0] prev_probes;
  int exp_q [NCPU][$];
  bit first_win = 1'b1;
  bit in_rst_d = 1'b1;

  function automatic int unsigned sat10(input longint unsigned v);
    return (v > 1023) ? 1023 : int'(v);
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NCPU; i++) begin acc_h[i] = 0; acc_c[i] = 0; acc_f[i] = 0; end
      first_win = 1'b1;
    end else if (model_rst) begin
      for (int i = 0; i < NCPU; i++) begin acc_h[i] = 0; acc_c[i] = 0; acc_f[i] = 0; end
    end else begin
      for (int i = 0; i < NCPU; i++) begin
        if (!in_rst_d) begin
          acc_h[i] += $countones(core_probes[i][31:0] ^ prev_probes[i][31:0]);
          acc_c[i] += (core_probes[i][39:32] != prev_probes[i][39:32]) ? 1 : 0;
          acc_f[i] += (core_probes[i][40] != prev_probes[i][40]) ? 1 : 0;
        end
      end
      if (dut.cyc == TP - 1) begin
        for (int i = 0; i < NCPU; i++) begin
          int unsigned e;
          e = 10 + sat10((longint'(acc_h[i]) * 'h400) >> 16)
                 + sat10((longint'(acc_c[i]) * 'h8000) >> 16)
                 + sat10((longint'(acc_f[i]) * 'h4000) >> 16);
          if (e > 4095) e = 4095;
          exp_q[i].push_back(first_win ? -1 : int'(e));
          acc_h[i] = 0; acc_c[i] = 0; acc_f[i] = 0;
        end
        first_win = 1'b0;
      end
    end
    prev_probes = core_probes;
    in_rst_d = rst;
  end

  // Estimates are valid in the second cycle after the window's last cycle
  // t (cycle t+2), i.e. one clock edge after the edge that closes it.
  int win_end_age = -1;
  always @(posedge clk) begin
    if (rst) win_end_age = -1;
    else if (!model_rst && dut.cyc == TP - 1) win_end_age = 0;
    else if (win_end_age >= 0) win_end_age++;
  end

  always @(negedge clk) begin
    if (!rst && dut.p_valid[0]) begin
      check(win_end_age == 1, $sformatf("estimate latency %0d", win_end_age));
      for (int i = 0; i < NCPU; i++) begin
        int e;
        if (exp_q[i].size() == 0) begin
          check(1'b0, "estimate without a window");
        end else begin
          e = exp_q[i].pop_front();
          if (e >= 0) begin
            check(int'(core_power[i]) == e,
                  $sformatf("core %0d power %0d expected %0d", i, core_power[i], e));
            m_est++;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ clock gating
  int  gated_cnt [NCPU];
  int  act_start [NCPU];
  bit  seen_gate [NCPU];
  bit  epoch_disturbed = 1'b1;
  logic [NCPU-1:0] en_at_neg = '1;

  always @(negedge clk) begin
    if (rst) begin
      for (int i = 0; i < NCPU; i++) begin gated_cnt[i] = 0; seen_gate[i] = 0; end
      epoch_disturbed = 1'b1;
    end else begin
      #1;
      for (int i = 0; i < NCPU; i++) begin
        check(core_gclk[i] == 1'b0, "gated clock high while clk low");
        if (dut.cyc == 0) begin
          gated_cnt[i] = 0;
          seen_gate[i] = 0;
          act_start[i] = int'(core_act[i]);
        end
        if (!core_clk_en[i]) begin
          gated_cnt[i]++;
          // Cycles before the new action is stored still follow the old one.
          if (dut.cyc >= 8) seen_gate[i] = 1;
          check(int'(dut.cyc) >= int'(TP) - int'(core_act[i]) || dut.cyc < 8,
                $sformatf("core %0d gated at cycle %0d with action %0d", i, dut.cyc, core_act[i]));
        end else if (seen_gate[i] && dut.cyc >= 8) begin
          check(1'b0, "gating mask not contiguous");
        end
        if (dut.cyc == TP - 1) begin
          if (!epoch_disturbed && act_start[i] == int'(core_act[i]) && act_start[i] <= 90) begin
            check(gated_cnt[i] == int'(core_act[i]),
                  $sformatf("core %0d gated %0d cycles, action %0d", i, gated_cnt[i], core_act[i]));
            if (gated_cnt[i] > 0) m_gate++;
            if (gated_cnt[i] > 30) m_gate_deep++;
          end
        end
      end
      if (dut.cyc == TP - 1) epoch_disturbed = 1'b0;
      en_at_neg = core_clk_en;
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      #1;
      for (int i = 0; i < NCPU; i++)
        check(core_gclk[i] == en_at_neg[i], "gated clock edge differs from the enable");
    end
  end

  // ------------------------------------------------------------ global loop reference
  longint s_ref = 0;
  int unsigned sp_mirror = 400;
  bit gc_pending = 1'b0;
  int b_exp, s_exp;

  always @(posedge clk) begin
    if (rst) begin
      s_ref = 0;
      gc_pending = 1'b0;
    end else if (dut.tot_valid) begin
      longint s_sum, s_int, b;
      s_sum = s_ref + 655 * (longint'(dut.global_sp) - longint'(total_power));
      if (s_sum > (longint'(2000) <<< 16)) s_sum = longint'(2000) <<< 16;
      if (s_sum < -(longint'(2000) <<< 16)) s_sum = -(longint'(2000) <<< 16);
      s_ref = s_sum;
      s_int = s_sum >>> 16;
      b = longint'(dut.global_sp) + s_int;
      if (b < 0) b = 0;
      if (b > 4000) b = 4000;
      b_exp = int'(b);
      s_exp = int'(s_int);
      gc_pending = 1'b1;
    end
  end

  always @(negedge clk) begin
    if (!rst && gc_pending) begin
      gc_pending = 1'b0;
      check(int'(total_budget) == b_exp, $sformatf("budget %0d expected %0d", total_budget, b_exp));
      check(int'(dut.slack) == s_exp, $sformatf("slack %0d expected %0d", dut.slack, s_exp));
      check(int'(dut.global_sp) == int'(sp_mirror), "global set point register");
      if (s_exp > 0) m_slack_pos++;
      if (s_exp < 0) m_slack_neg++;
      if (s_exp == 2000) m_slack_sat++;
      if (b_exp == 4000) m_budget_clamp++;
    end
  end

  // Set points follow theta * budget; theta always sums to one.
  always @(negedge clk) begin
    if (!rst && dut.sp_valid) begin
      int unsigned s;
      s = 0;
      for (int i = 0; i < NCPU; i++) begin
        int unsigned e;
        s += dut.theta[i];
        e = (int'(total_budget) * int'(dut.theta[i])) >> 10;
        if (e > 4095) e = 4095;
        check(int'(core_sp[i]) == int'(e), $sformatf("core %0d set point", i));
      end
      check(s == 1024, "theta does not sum to one");
    end
  end

  // ------------------------------------------------------------ bus
  task automatic bus(input bit w, input logic [7:0] a, input logic [31:0] d,
                     output logic [31:0] q);
    @(negedge clk);
    req = 1'b1; we = w; addr = a; wdata = d;
    @(negedge clk);
    req = 1'b0; we = 1'b0;
    check(ack == 1'b1, "bus ack one cycle after the request");
    q = rdata;
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    logic [31:0] q;
    bus(1'b1, a, d, q);
  endtask

  task automatic set_sp(input int unsigned sp);
    wr(8'h00, sp);
    sp_mirror = sp;
    m_sp_write++;
  endtask

  // Reads in mid-epoch, when nothing changes, and compares with the ports.
  task automatic read_all();
    logic [31:0] q;
    wait (dut.cyc == 40);
    bus(1'b0, 8'h00, 0, q); check(q[15:0] == 16'(sp_mirror), "read GLOBAL_SP");
    bus(1'b0, 8'h04, 0, q); check(q[15:0] == total_power, "read TOTAL_POWER");
    bus(1'b0, 8'h08, 0, q); check(q[11:0] == total_budget, "read TOTAL_BUDGET");
    for (int i = 0; i < NCPU; i++) begin
      bus(1'b0, 8'(16 + 16 * i), 0, q);
      check(q[0] == core_active[i], "read STATUS active");
      check(q[5:4] == 2'(dut.core_class[i]), "read STATUS class");
      bus(1'b0, 8'(16 + 16 * i + 4), 0, q); check(q[11:0] == core_power[i], "read ACTUAL_POWER");
      bus(1'b0, 8'(16 + 16 * i + 8), 0, q); check(q[11:0] == core_sp[i], "read POWER_BUDGET");
      bus(1'b0, 8'(16 + 16 * i + 12), 0, q); check(q[26:16] == dut.theta[i], "read THETA");
    end
    m_bus_read++;
  endtask

  task automatic epochs(input int n);
    repeat (n * TP) @(posedge clk);
  endtask

  // Average total power over n epochs.
  task automatic avg_power(input int n, output real avg);
    longint sum;
    sum = 0;
    for (int k = 0; k < n; k++) begin
      @(posedge dut.tot_valid);
      @(negedge clk);
      sum += longint'(total_power);
    end
    avg = real'(sum) / n;
  endtask

  // Supervisor observations.
  logic [NCPU-1:0][10:0] theta_prev;
  always @(posedge clk) begin
    if (rst) theta_prev = dut.theta;
    else if (dut.sup_updated) begin
      #1;
      for (int i = 0; i < NCPU; i++) begin
        if (dut.core_class[i] == CORE_BALANCED) m_balanced++;
      end
      for (int i = 0; i < NCPU; i++)
        for (int j = 0; j < NCPU; j++)
          if (i != j && dut.theta[i] > theta_prev[i] && dut.theta[j] < theta_prev[j]) begin
            if (dut.core_class[i] == CORE_UNBALANCED && dut.core_class[j] == CORE_UNBALANCED)
              m_balance++;
            if (dut.core_class[i] == CORE_UNBALANCED && dut.core_class[j] == CORE_BALANCED)
              m_reclaim++;
          end
      theta_prev = dut.theta;
    end
  end

  // ------------------------------------------------------------ scenario
  initial begin
    real avg;
    logic [31:0] q;
    for (int i = 0; i < NCPU; i++) begin intensity[i] = 90; mix[i] = i % 3; end
    core_active = '1;
    repeat (5) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    // Phase 1: reset set point, then a tight one.
    epochs(100);
    read_all();
    set_sp(200);
    epochs(300);
    avg_power(300, avg);
    $display("avg total power %0.1f mW at set point 200 mW", avg);
    check(avg > 190.0 && avg < 210.0, "average total power off the set point");
    if (avg > 190.0 && avg < 210.0) m_track++;
    begin
      int unsigned umax, umin;
      umax = 0; umin = '1;
      for (int i = 0; i < NCPU; i++) begin
        if (dut.util[i] > umax) umax = dut.util[i];
        if (dut.util[i] < umin) umin = dut.util[i];
      end
      if (umax != umin) m_util_gap++;
    end
    read_all();

    // Phase 2: a self-limiting application on core 3.
    intensity[3] = 15;
    epochs(200);
    read_all();

    // The OS imposes theta = 1/8 on core 1.
    wr(8'h10 + 8'h10 + 8'h0C, 32'h8000_0080);
    epochs(3 * DW);
    check(dut.theta[1] == 11'd128, "forced theta not applied");
    check(dut.core_class[1] == CORE_FORCED, "forced class");
    if (dut.theta[1] == 11'd128 && dut.core_class[1] == CORE_FORCED) m_forced++;
    bus(1'b0, 8'h2C, 0, q);
    check(q[31] == 1'b1 && q[10:0] == 11'd128 && q[26:16] == 11'd128, "read forced THETA");
    read_all();
    wr(8'h2C, 32'h0);

    // Core 0 finishes its application.
    core_active[0] = 1'b0;
    epochs(3 * DW);
    check(dut.core_class[0] == CORE_IDLE, "idle class");
    check(dut.theta[0] == 0, "idle core keeps theta");
    check(core_act[0] == 0, "idle core throttled");
    if (dut.core_class[0] == CORE_IDLE && dut.theta[0] == 0) m_idle++;
    read_all();
    core_active[0] = 1'b1;
    intensity[3] = 90;

    // Phase 3: a generous set point saturates the correction and budget.
    set_sp(3000);
    epochs(150);
    read_all();

    // model_rst in mid-epoch restarts every window.
    wait (dut.cyc == 37);
    @(negedge clk);
    model_rst = 1'b1;
    epoch_disturbed = 1'b1;
    @(negedge clk);
    model_rst = 1'b0;
    check(dut.cyc == 0, "model_rst restarts the epoch");
    epochs(3);
    m_model_rst++;

    set_sp(100);
    epochs(150);
    read_all();

    $display("mechanisms: est=%0d gate=%0d deep=%0d track=%0d slack+=%0d slack-=%0d sat=%0d clamp=%0d",
             m_est, m_gate, m_gate_deep, m_track, m_slack_pos, m_slack_neg, m_slack_sat, m_budget_clamp);
    $display("mechanisms: balance=%0d balanced=%0d reclaim=%0d forced=%0d idle=%0d sp_write=%0d model_rst=%0d reads=%0d util_gap=%0d",
             m_balance, m_balanced, m_reclaim, m_forced, m_idle, m_sp_write, m_model_rst, m_bus_read, m_util_gap);
    check(m_est > 0, "no power estimate checked");
    check(m_gate > 0, "clock gating never happened");
    check(m_gate_deep > 0, "deep throttling never happened");
    check(m_track > 0, "set point tracking never shown");
    check(m_slack_pos > 0, "positive global correction never happened");
    check(m_slack_neg > 0, "negative global correction never happened");
    check(m_slack_sat > 0, "correction saturation never happened");
    check(m_budget_clamp > 0, "budget clamp never happened");
    check(m_balance > 0, "utility balancing never happened");
    check(m_balanced > 0, "balanced class never seen");
    check(m_reclaim > 0, "reclaim from a balanced core never happened");
    check(m_forced > 0, "OS forced theta never happened");
    check(m_idle > 0, "idle redistribution never happened");
    check(m_sp_write > 0, "set point write never happened");
    check(m_model_rst > 0, "model_rst never happened");
    check(m_bus_read > 0, "register reads never happened");
    check(m_util_gap > 0, "utilities never differed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
