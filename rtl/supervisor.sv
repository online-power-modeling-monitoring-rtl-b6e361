// supervisor: energy-allocation policy that reshapes the theta vector.
//
// Every DWELL epochs (the dwell time that keeps the switched control
// system exponentially stable) the supervisor visits the cores one per
// clock cycle and classifies each one:
//   forced      the OS imposes its theta (force_en, force_theta);
//   idle        no application runs on it;
//   balanced    active, but its control action is zero, so the
//               application limits itself and more budget would not help;
//   unbalanced  active and throttled by the controller.
// During the visit it records the unbalanced cores of highest and lowest
// utility, an idle core that still holds budget, a forced core whose theta
// differs from the imposed one and the balanced core holding most budget.
// It then makes one transfer of theta between two cores, so the sum of
// theta stays exactly THETA_ONE, in this order of priority:
//   1. bring a forced core's theta to the imposed value, taking from or
//      giving to the unbalanced core of highest / lowest utility (or any
//      other non-forced active core, then any non-forced core);
//   2. give the whole theta of an idle core to the lowest-utility
//      unbalanced core (or another non-forced active core);
//   3. if the utility gap among unbalanced cores exceeds UTIL_TOL, move
//      STEP from the highest- to the lowest-utility unbalanced core;
//   4. move STEP from the balanced core with most theta to the
//      lowest-utility unbalanced core.
// After reset every core holds THETA_ONE / NCPU (the remainder goes to
// core 0).
//
// Interface: clk, rst (synchronous), epoch_end (one pulse per epoch),
// core_active, act (control actions), util (utilities), force_en and
// force_theta (OS requests); theta (current weights), core_class, and
// updated (one pulse when a visit ends).
// Timing: a visit takes NCPU + 1 cycles after the DWELL-th epoch_end.
// The three sets, the goal (balanced utility among unbalanced cores), OS
// and application theta requests and the 64 us dwell (32 epochs of 2 us)
// follow the policy description. The transfer rules, their order, STEP
// and UTIL_TOL are this design's choices, since the document gives the
// goal of the policy but not its algorithm.
module supervisor #(
  parameter int unsigned NCPU       = 4,
  parameter int unsigned DWELL      = 32,
  parameter int unsigned ACT_W      = pwr_pkg::ACT_W,
  parameter int unsigned UTIL_W     = pwr_pkg::UTIL_W,
  parameter int unsigned THETA_W    = pwr_pkg::THETA_W,
  parameter int unsigned THETA_ONE  = pwr_pkg::THETA_ONE,
  parameter int unsigned STEP       = 16,   // 1/64
  parameter int unsigned UTIL_TOL   = 4
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic                                epoch_end,
  input  logic [NCPU-1:0]                     core_active,
  input  logic [NCPU-1:0][ACT_W-1:0]          act,
  input  logic [NCPU-1:0][UTIL_W-1:0]         util,
  input  logic [NCPU-1:0]                     force_en,
  input  logic [NCPU-1:0][THETA_W-1:0]        force_theta,
  output logic [NCPU-1:0][THETA_W-1:0]        theta,
  output pwr_pkg::core_class_e [NCPU-1:0]     core_class,
  output logic                                updated
);

  import pwr_pkg::*;

  localparam int unsigned IW = (NCPU > 1) ? $clog2(NCPU) : 1;
  localparam int unsigned DW = $clog2(DWELL + 1);

  typedef enum logic [1:0] {S_WAIT, S_SCAN, S_APPLY} state_e;

  state_e           state;
  logic [DW-1:0]    ep_cnt;
  logic [IW-1:0]    idx;

  // Findings of the visit.
  logic             hi_ok, lo_ok, idle_ok, frc_ok, bal_ok, any_ok;
  logic [IW-1:0]    hi_i, lo_i, idle_i, frc_i, bal_i, any_i;
  logic [UTIL_W-1:0] hi_u, lo_u;

  core_class_e      cls;

  // Class of the core visited this cycle.
  always_comb begin
    if (force_en[idx])         cls = CORE_FORCED;
    else if (!core_active[idx]) cls = CORE_IDLE;
    else if (act[idx] == '0)   cls = CORE_BALANCED;
    else                       cls = CORE_UNBALANCED;
  end

  // Transfer chosen at the end of a visit.
  logic             xfer;
  logic [IW-1:0]    src, dst;
  logic [THETA_W-1:0] amount;
  logic [IW-1:0]    rcv_i, don_i;
  logic             rcv_ok, don_ok;

  function automatic logic [THETA_W-1:0] tmin(logic [THETA_W-1:0] a, logic [THETA_W-1:0] b);
    return (a < b) ? a : b;
  endfunction

  always_comb begin
    xfer   = 1'b0;
    src    = '0;
    dst    = '0;
    amount = '0;
    // Receiver: lowest-utility unbalanced, else another active, non-forced core.
    rcv_ok = lo_ok || any_ok;
    rcv_i  = lo_ok ? lo_i : any_i;
    // Donor: highest-utility unbalanced, else another active, non-forced core.
    don_ok = hi_ok || any_ok;
    don_i  = hi_ok ? hi_i : any_i;
    if (frc_ok) begin
      if (theta[frc_i] > force_theta[frc_i]) begin
        if (rcv_ok) begin
          xfer = 1'b1; src = frc_i; dst = rcv_i;
          amount = theta[frc_i] - force_theta[frc_i];
        end
      end else if (don_ok) begin
        xfer = 1'b1; src = don_i; dst = frc_i;
        amount = tmin(force_theta[frc_i] - theta[frc_i], theta[don_i]);
      end
    end else if (idle_ok && rcv_ok) begin
      xfer = 1'b1; src = idle_i; dst = rcv_i; amount = theta[idle_i];
    end else if (hi_ok && lo_ok && (hi_i != lo_i) && (hi_u - lo_u > UTIL_W'(UTIL_TOL))) begin
      xfer = 1'b1; src = hi_i; dst = lo_i; amount = tmin(THETA_W'(STEP), theta[hi_i]);
    end else if (bal_ok && lo_ok) begin
      xfer = 1'b1; src = bal_i; dst = lo_i; amount = tmin(THETA_W'(STEP), theta[bal_i]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_WAIT;
      ep_cnt  <= '0;
      idx     <= '0;
      updated <= 1'b0;
      for (int i = 0; i < NCPU; i++) begin
        theta[i]      <= THETA_W'(THETA_ONE / NCPU);
        core_class[i] <= CORE_IDLE;
      end
      theta[0] <= THETA_W'(THETA_ONE / NCPU + THETA_ONE % NCPU);
      {hi_ok, lo_ok, idle_ok, frc_ok, bal_ok, any_ok} <= '0;
      {hi_i, lo_i, idle_i, frc_i, bal_i, any_i} <= '0;
      hi_u <= '0;
      lo_u <= '0;
    end else begin
      updated <= 1'b0;
      unique case (state)
        S_WAIT: begin
          if (epoch_end) begin
            if (ep_cnt == DW'(DWELL - 1)) begin
              ep_cnt <= '0;
              idx    <= '0;
              state  <= S_SCAN;
              {hi_ok, lo_ok, idle_ok, frc_ok, bal_ok, any_ok} <= '0;
            end else begin
              ep_cnt <= ep_cnt + 1'b1;
            end
          end
        end
        S_SCAN: begin
          core_class[idx] <= cls;
          unique case (cls)
            CORE_FORCED: begin
              if (theta[idx] != force_theta[idx] && !frc_ok) begin
                frc_ok <= 1'b1; frc_i <= idx;
              end
            end
            CORE_IDLE: begin
              if (theta[idx] != '0 && !idle_ok) begin
                idle_ok <= 1'b1; idle_i <= idx;
              end
            end
            CORE_BALANCED: begin
              if (!any_ok) begin any_ok <= 1'b1; any_i <= idx; end
              if (!bal_ok || theta[idx] > theta[bal_i]) begin
                bal_ok <= 1'b1; bal_i <= idx;
              end
            end
            default: begin  // CORE_UNBALANCED
              if (!any_ok) begin any_ok <= 1'b1; any_i <= idx; end
              if (!hi_ok || util[idx] > hi_u) begin
                hi_ok <= 1'b1; hi_i <= idx; hi_u <= util[idx];
              end
              if (!lo_ok || util[idx] < lo_u) begin
                lo_ok <= 1'b1; lo_i <= idx; lo_u <= util[idx];
              end
            end
          endcase
          if (idx == IW'(NCPU - 1)) state <= S_APPLY;
          else                      idx   <= idx + 1'b1;
        end
        default: begin  // S_APPLY
          if (xfer && src != dst) begin
            theta[src] <= theta[src] - amount;
            theta[dst] <= theta[dst] + amount;
          end
          updated <= 1'b1;
          state   <= S_WAIT;
        end
      endcase
    end
  end

  // The weights always add up to one.
  function automatic int unsigned theta_sum(logic [NCPU-1:0][THETA_W-1:0] t);
    int unsigned s = 0;
    for (int i = 0; i < NCPU; i++) s += 32'(t[i]);
    return s;
  endfunction

  assert property (@(posedge clk) disable iff (rst) theta_sum(theta) == THETA_ONE);

endmodule
