// pwr_mgmt_top: all-digital energy-budget and energy-allocation controller
// for an NCPU-core processor, fed by switching-activity power monitors.
//
// Hierarchy of control, once per epoch of TP clock cycles:
//   * per core, a power monitor estimates the core's average power P_i
//     from the switching activity of probed core signals; a utility unit
//     weighs the instructions the core committed;
//   * per core, a local controller (filtered PI loop) compares P_i with
//     the core's set point and computes the control action A_i, the cycles
//     per epoch a dynamic clock gating actuator takes from the core;
//   * a global controller integrates the gap between the global set point
//     written by the OS and the total power, and outputs the corrected
//     total budget; a budget split turns it into the per-core set points
//     theta_i * budget;
//   * a supervisor reshapes theta every DWELL epochs to balance the
//     utility of the throttled cores, honouring theta values imposed by
//     the OS;
//   * a register bank lets software set the global set point and theta
//     requests and read power, budgets, classes and actions.
//
// Ports: clk, rst (synchronous, active high), model_rst (restarts the
// epoch in every monitor and the control timer); per core: core_probes
// (the monitored core signals, concatenated per the monitor model),
// core_commit (class of the instruction committed this cycle, see
// pwr_pkg::instr_class_e), core_active (an application runs on the core),
// core_clk_en / core_gclk (clock enable and gated clock for the core),
// core_act (control action, for an external frequency-scaling actuator),
// core_power, core_sp; total_power, total_budget; the register bus (req,
// we, addr, wdata, rdata, ack; see pwr_regs).
// Timing: with the epoch ending at cycle t, the power estimates are valid
// at t+2, the control actions and the total power at t+3, the corrected
// budget at t+4 and the new set points at t+5; the actions act on the
// masked last cycles of the epoch that has just begun.
// The structure follows the hierarchical control scheme; the defaults
// (4 cores, 100-cycle epochs, 32-epoch dwell) are its main configuration.
// The per-core power model is a placeholder of three probes, since the
// identified model of a real core is not available; the frequency-scaling
// actuator, a vendor clock-manager macro, is left outside (core_act).
// Every unit works on the shared epoch, so the valid strobes of the
// utility units, the budget split and the supervisor, and the raw
// utility ucalc, are not needed here and stay unread.
module pwr_mgmt_top #(
  parameter int unsigned NCPU      = 4,
  parameter int unsigned TP        = pwr_pkg::TP,
  parameter int unsigned DWELL     = 32,
  parameter int unsigned SP_RESET  = 400,
  // Per-core power model.
  parameter int unsigned N_SIG     = 3,
  parameter int unsigned COEFF_W   = 24,
  parameter int unsigned COEFF_FRAC = 16,
  parameter int unsigned SIG_W [N_SIG]        = '{32, 8, 1},
  parameter pwr_pkg::sacm_e SACM [N_SIG]      = '{pwr_pkg::SACM_HWC, pwr_pkg::SACM_SVC, pwr_pkg::SACM_SVC},
  parameter logic [COEFF_W-1:0] COEFF [N_SIG] = '{24'h000400, 24'h008000, 24'h004000},
  parameter logic [N_SIG-1:0] SIGN            = '0,
  parameter int CONST                         = 10,
  parameter int unsigned PROBE_W              = 41
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               model_rst,
  // cores
  input  logic [NCPU-1:0][PROBE_W-1:0]       core_probes,
  input  logic [NCPU-1:0][1:0]               core_commit,
  input  logic [NCPU-1:0]                    core_active,
  output logic [NCPU-1:0]                    core_clk_en,
  output logic [NCPU-1:0]                    core_gclk,
  output logic [NCPU-1:0][$clog2(TP)-1:0]    core_act,
  output logic [NCPU-1:0][pwr_pkg::PWR_W-1:0] core_power,
  output logic [NCPU-1:0][pwr_pkg::PWR_W-1:0] core_sp,
  output logic [15:0]                        total_power,
  output logic [pwr_pkg::PWR_W-1:0]          total_budget,
  // register bus
  input  logic                               req,
  input  logic                               we,
  input  logic [7:0]                         addr,
  input  logic [31:0]                        wdata,
  output logic [31:0]                        rdata,
  output logic                               ack
);

  import pwr_pkg::*;

  localparam int unsigned AW  = $clog2(TP);
  localparam int unsigned UW  = $clog2(16 * TP + 1);

  // ---------------------------------------------------------------- timing
  logic                     epoch_end;
  logic [$clog2(TP+1)-1:0]  cyc;

  pwr_window_timer #(.T(TP)) u_epoch (
    .clk(clk), .rst(rst), .model_rst(model_rst), .win_end(epoch_end), .cyc(cyc)
  );

  // ---------------------------------------------------------------- per core
  logic [NCPU-1:0]                 p_valid;
  logic [NCPU-1:0]                 act_valid;
  logic [NCPU-1:0][UW-1:0]         util;
  logic [NCPU-1:0]                 util_valid;
  logic [NCPU-1:0][UW-1:0]         ucalc;
  logic [NCPU-1:0][AW-1:0]         gated;
  logic [NCPU-1:0][THETA_W-1:0]    theta;
  logic [NCPU-1:0][AW-1:0]         sup_act;
  logic                            sp_valid;

  for (genvar i = 0; i < NCPU; i++) begin : g_core
    power_monitor #(
      .N_SIG(N_SIG), .T(TP), .COEFF_W(COEFF_W), .COEFF_FRAC(COEFF_FRAC),
      .SIG_W(SIG_W), .SACM(SACM), .COEFF(COEFF), .SIGN(SIGN), .CONST(CONST),
      .PROBE_W(PROBE_W)
    ) u_mon (
      .clk(clk), .rst(rst), .model_rst(model_rst), .probes(core_probes[i]),
      .pwr_est(core_power[i]), .est_valid(p_valid[i])
    );

    utility_calc #(.TP(TP), .UTIL_W(UW)) u_util (
      .clk(clk), .rst(rst), .commit(instr_class_e'(core_commit[i])),
      .epoch_end(epoch_end), .util(util[i]), .ucalc(ucalc[i]), .util_valid(util_valid[i])
    );

    local_controller #(.TP(TP), .P_W(PWR_W)) u_lc (
      .clk(clk), .rst(rst), .active(core_active[i]), .p_valid(p_valid[i]),
      .p_meas(core_power[i]), .p_sp(core_sp[i]), .act(core_act[i]), .act_valid(act_valid[i])
    );

    dcg_actuator #(.TP(TP)) u_dcg (
      .clk(clk), .rst(rst), .cyc(cyc), .act_valid(act_valid[i]), .act(core_act[i]),
      .clk_en(core_clk_en[i]), .gclk(core_gclk[i]), .gated_cycles(gated[i])
    );

    // The supervisor looks at the cycles actually taken from the core in
    // the last full epoch.
    assign sup_act[i] = gated[i];
  end

  // ---------------------------------------------------------------- total power
  logic        tot_valid;
  logic [15:0] tot_sum;

  always_comb begin
    tot_sum = '0;
    for (int i = 0; i < NCPU; i++) tot_sum = tot_sum + 16'(core_power[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      total_power <= '0;
      tot_valid   <= 1'b0;
    end else begin
      tot_valid <= p_valid[0];
      if (p_valid[0]) total_power <= tot_sum;
    end
  end

  // ---------------------------------------------------------------- global loop
  logic [15:0]              global_sp;
  logic signed [PWR_W:0]    slack;
  logic                     b_valid;

  global_controller #(.P_W(16), .B_W(PWR_W)) u_gc (
    .clk(clk), .rst(rst), .valid(tot_valid), .p_tot(total_power), .p_sp(global_sp),
    .slack(slack), .budget(total_budget), .out_valid(b_valid)
  );

  budget_split #(.NCPU(NCPU), .B_W(PWR_W)) u_split (
    .clk(clk), .rst(rst), .valid(b_valid), .budget(total_budget), .theta(theta),
    .p_sp(core_sp), .out_valid(sp_valid)
  );

  // ---------------------------------------------------------------- supervisor
  logic [NCPU-1:0]                 force_en;
  logic [NCPU-1:0][THETA_W-1:0]    force_theta;
  core_class_e [NCPU-1:0]          core_class;
  logic                            sup_updated;

  supervisor #(
    .NCPU(NCPU), .DWELL(DWELL), .ACT_W(AW), .UTIL_W(UW)
  ) u_sup (
    .clk(clk), .rst(rst), .epoch_end(epoch_end), .core_active(core_active),
    .act(sup_act), .util(util), .force_en(force_en), .force_theta(force_theta),
    .theta(theta), .core_class(core_class), .updated(sup_updated)
  );

  // ---------------------------------------------------------------- registers
  pwr_regs #(.NCPU(NCPU), .ADDR_W(8), .ACT_W(AW), .SP_RESET(SP_RESET)) u_regs (
    .clk(clk), .rst(rst), .req(req), .we(we), .addr(addr), .wdata(wdata),
    .rdata(rdata), .ack(ack),
    .total_power(total_power), .total_budget(total_budget), .slack(slack),
    .core_active(core_active), .core_class(core_class), .act(sup_act),
    .core_power(core_power), .core_sp(core_sp), .theta(theta),
    .global_sp(global_sp), .force_en(force_en), .force_theta(force_theta)
  );

  // All monitors share one window length and reset, so they report together.
  assert property (@(posedge clk) disable iff (rst) p_valid == '0 || p_valid == '1);

endmodule
