// tb_supervisor: test of the theta-allocation supervisor.
// Holds the core inputs constant between updates and, at every update,
// compares the new theta vector with a reference of the allocation rules
// (forced theta first, then idle cores, then utility balancing among
// unbalanced cores, then reclaiming budget from balanced cores). Checks
// that theta always sums to 1.0, that updates come every DWELL epochs,
// that the reported classes are right, and that each rule fired.
module tb_supervisor;
  localparam int unsigned NCPU = 4, DWELL = 3, STEP = 16, TOL = 4;
  logic clk = 0, rst = 1;
  logic epoch_end;
  logic [NCPU-1:0] core_active = '1, force_en = '0;
  logic [NCPU-1:0][6:0] act = '0;
  logic [NCPU-1:0][10:0] util = '0;
  logic [NCPU-1:0][10:0] force_theta = '0;
  logic [NCPU-1:0][10:0] theta;
  pwr_pkg::core_class_e [NCPU-1:0] core_class;
  logic updated;
  int checks = 0, failures = 0;
  int n_forced = 0, n_idle = 0, n_balance = 0, n_reclaim = 0, n_updates = 0;

  supervisor #(.NCPU(NCPU), .DWELL(DWELL), .STEP(STEP), .UTIL_TOL(TOL)) dut (
    .clk, .rst, .epoch_end, .core_active, .act, .util, .force_en, .force_theta,
    .theta, .core_class, .updated);

  always #5 clk = ~clk;

  // epochs of 10 cycles
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= (cyc == 9) ? 0 : cyc + 1;
  end
  assign epoch_end = !rst && (cyc == 9);

  int th [NCPU];

  function automatic pwr_pkg::core_class_e cls_of(int i);
    if (force_en[i]) return pwr_pkg::CORE_FORCED;
    if (!core_active[i]) return pwr_pkg::CORE_IDLE;
    if (act[i] == 0) return pwr_pkg::CORE_BALANCED;
    return pwr_pkg::CORE_UNBALANCED;
  endfunction

  // Reference of one update.
  task automatic ref_update();
    int hi = -1, lo = -1, idle = -1, frc = -1, bal = -1, any = -1;
    int rcv, don, amt;
    for (int i = 0; i < NCPU; i++) begin
      case (cls_of(i))
        pwr_pkg::CORE_FORCED:   if (frc < 0 && th[i] != int'(force_theta[i])) frc = i;
        pwr_pkg::CORE_IDLE:     if (idle < 0 && th[i] != 0) idle = i;
        pwr_pkg::CORE_BALANCED: begin
          if (any < 0) any = i;
          if (bal < 0 || th[i] > th[bal]) bal = i;
        end
        default: begin
          if (any < 0) any = i;
          if (hi < 0 || util[i] > util[hi]) hi = i;
          if (lo < 0 || util[i] < util[lo]) lo = i;
        end
      endcase
    end
    rcv = (lo >= 0) ? lo : any;
    don = (hi >= 0) ? hi : any;
    if (frc >= 0) begin
      if (th[frc] > int'(force_theta[frc])) begin
        if (rcv >= 0) begin amt = th[frc] - int'(force_theta[frc]); th[frc] -= amt; th[rcv] += amt; n_forced++; end
      end else if (don >= 0) begin
        amt = int'(force_theta[frc]) - th[frc];
        if (amt > th[don]) amt = th[don];
        th[don] -= amt; th[frc] += amt; n_forced++;
      end
    end else if (idle >= 0 && rcv >= 0) begin
      th[rcv] += th[idle]; th[idle] = 0; n_idle++;
    end else if (hi >= 0 && lo >= 0 && hi != lo && int'(util[hi]) - int'(util[lo]) > TOL) begin
      amt = (th[hi] < STEP) ? th[hi] : STEP;
      th[hi] -= amt; th[lo] += amt; n_balance++;
    end else if (bal >= 0 && lo >= 0) begin
      amt = (th[bal] < STEP) ? th[bal] : STEP;
      th[bal] -= amt; th[lo] += amt; n_reclaim++;
    end
  endtask

  int last_update = -1, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    if (!rst && updated) begin
      int sum;
      sum = 0;
      ref_update();
      n_updates++;
      for (int i = 0; i < NCPU; i++) begin
        sum += int'(theta[i]);
        checks += 2;
        if (int'(theta[i]) != th[i]) begin
          failures++; $display("FAIL: update %0d theta[%0d]=%0d expected %0d", n_updates, i, theta[i], th[i]);
        end
        if (core_class[i] != cls_of(i)) begin
          failures++; $display("FAIL: class of core %0d", i);
        end
      end
      checks++;
      if (sum != 1024) begin failures++; $display("FAIL: theta sums to %0d", sum); end
      if (last_update >= 0) begin
        checks++;
        if (cycle - last_update != DWELL * 10) begin
          failures++; $display("FAIL: update spacing %0d", cycle - last_update);
        end
      end
      last_update = cycle;
    end
  end

  task automatic wait_updates(int n);
    repeat (n) @(posedge updated);
    @(negedge clk);
    #1;  // after the checker has seen this update
  endtask

  initial begin
    foreach (th[i]) th[i] = 256;
    repeat (2) @(negedge clk);
    rst = 0;
    // 1. all throttled, unequal utility: balancing
    act = {7'd20, 7'd30, 7'd10, 7'd40};
    util = {11'd300, 11'd200, 11'd500, 11'd100};
    wait_updates(6);
    // 2. core 3 goes idle
    core_active[3] = 0; act[3] = 0; util[3] = 0;
    wait_updates(2);
    // 3. OS forces theta of core 2 to 100, later to 500
    force_en[2] = 1; force_theta[2] = 11'd100;
    wait_updates(2);
    force_theta[2] = 11'd500;
    wait_updates(3);
    force_en[2] = 0;
    // 4. core 1 self-limited (balanced), utilities of 0 and 2 equal
    act[1] = 0; util[0] = 11'd250; util[2] = 11'd252;
    wait_updates(4);
    // 5. all idle: nothing to receive
    core_active = '0; act = '0;
    wait_updates(2);
    checks++;
    if (n_forced == 0 || n_idle == 0 || n_balance == 0 || n_reclaim == 0) begin
      failures++;
      $display("FAIL: rules not all exercised forced=%0d idle=%0d balance=%0d reclaim=%0d",
               n_forced, n_idle, n_balance, n_reclaim);
    end
    $display("forced=%0d idle=%0d balance=%0d reclaim=%0d", n_forced, n_idle, n_balance, n_reclaim);
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
