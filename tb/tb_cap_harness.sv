// tb_cap_harness: runs one power-capping sweep on a pwr_mgmt_top of NCPU
// cores and scores it; used by tb_cap_sweep.
//
// For every global set point in SP_LIST and every number of running
// applications in APPS_LIST it resets the system, writes the set point
// through the register bus, starts that many busy behavioural cores
// (tb_core_model, intensity 90, mixed instruction classes; the other cores
// stay idle), lets the loops settle for SETTLE epochs and then measures
// MEASURE epochs. Scores per run:
//   OVF  = max(0, mean total power - set point), mW (segmented overflow);
//   EFF  = mean over cores of 1 - mean_k(max(0, Pcap_k,i)) / SP_i, with
//          Pmax = P * 100 / (100 - A) the power the core would draw
//          ungated and Pcap = min(SP_i - P, Pmax - P), the budget a core
//          leaves unused although it could use it; 100% means no such gap.
// Each run counts two checks: OVF <= OVF_MAX and EFF >= EFF_MIN.
// The set points, application counts and the two metrics follow the
// evaluation of the capping scheme; the thresholds, the core model and the
// settle/measure lengths are this test's choices.
// Interface: start (pulse) and done, checks and failures when done.
module tb_cap_harness #(
  parameter int unsigned NCPU      = 4,
  parameter int unsigned N_SP      = 4,
  parameter int unsigned SP_LIST [N_SP]   = '{100, 200, 300, 400},
  parameter int unsigned N_APPS    = 4,
  parameter int unsigned APPS_LIST [N_APPS] = '{1, 2, 3, 4},
  parameter int unsigned SETTLE    = 400,
  parameter int unsigned MEASURE   = 300,
  parameter real         OVF_MAX   = 10.0,
  parameter real         EFF_MIN   = 85.0
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned TP = 100;

  logic rst = 1'b1;
  logic [NCPU-1:0][40:0] core_probes;
  logic [NCPU-1:0][1:0]  core_commit;
  logic [NCPU-1:0]       core_active = '0;
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

  pwr_mgmt_top #(.NCPU(NCPU)) dut (
    .clk(clk), .rst(rst), .model_rst(1'b0),
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

  // Cycles gated per core in the current and in the last full epoch.
  int gated_now [NCPU], gated_last [NCPU];
  always @(negedge clk) begin
    for (int i = 0; i < NCPU; i++) begin
      if (dut.cyc == 0) gated_now[i] = 0;
      if (!core_clk_en[i]) gated_now[i]++;
      if (dut.cyc == TP - 1) gated_last[i] = gated_now[i];
    end
  end

  // Scoring, at each new set of estimates.
  bit    measuring = 1'b0;
  int    n_samples;
  real   sum_tot;
  real   sum_cap [NCPU];
  real   sum_sp [NCPU];
  always @(negedge clk) begin
    if (!rst && measuring && dut.p_valid[0]) begin
      n_samples++;
      sum_tot += real'(int'(core_power[0]));
      for (int i = 1; i < NCPU; i++) sum_tot += real'(int'(core_power[i]));
      for (int i = 0; i < NCPU; i++) begin
        real p, pmax, cap;
        p    = real'(int'(core_power[i]));
        pmax = p * 100.0 / real'(100 - gated_last[i]);
        cap  = real'(int'(core_sp[i])) - p;
        if (pmax - p < cap) cap = pmax - p;
        if (cap > 0.0) sum_cap[i] += cap;
        sum_sp[i] += real'(int'(core_sp[i]));
      end
    end
  end

  task automatic bus_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    req = 1'b1; we = 1'b1; addr = a; wdata = d;
    @(negedge clk);
    req = 1'b0; we = 1'b0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0d cores: %s", NCPU, what);
    end
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int i = 0; i < NCPU; i++) begin intensity[i] = 90; mix[i] = i % 3; end
    wait (start);
    for (int s = 0; s < N_SP; s++) begin
      for (int a = 0; a < N_APPS; a++) begin
        real avg, ovf, eff;
        @(negedge clk);
        rst = 1'b1;
        core_active = '0;
        repeat (4) @(negedge clk);
        rst = 1'b0;
        bus_write(8'h00, SP_LIST[s]);
        for (int i = 0; i < NCPU; i++) core_active[i] = (i < APPS_LIST[a]);
        repeat (SETTLE * TP) @(negedge clk);
        n_samples = 0;
        sum_tot = 0.0;
        for (int i = 0; i < NCPU; i++) begin sum_cap[i] = 0.0; sum_sp[i] = 0.0; end
        measuring = 1'b1;
        repeat (MEASURE * TP) @(negedge clk);
        measuring = 1'b0;
        avg = sum_tot / n_samples;
        ovf = avg - real'(SP_LIST[s]);
        if (ovf < 0.0) ovf = 0.0;
        eff = 0.0;
        for (int i = 0; i < NCPU; i++)
          eff += (sum_sp[i] > 0.0) ? 100.0 * (1.0 - sum_cap[i] / sum_sp[i]) : 100.0;
        eff = eff / NCPU;
        $display("%0d cores  set point %4d mW  apps %0d  mean power %7.1f mW  OVF %5.2f mW  EFF %6.2f %%",
                 NCPU, SP_LIST[s], APPS_LIST[a], avg, ovf, eff);
        check(ovf <= OVF_MAX, $sformatf("overflow %0.2f mW at %0d mW, %0d apps", ovf, SP_LIST[s], APPS_LIST[a]));
        check(eff >= EFF_MIN, $sformatf("efficiency %0.2f at %0d mW, %0d apps", eff, SP_LIST[s], APPS_LIST[a]));
      end
    end
    done = 1'b1;
  end
endmodule
