// tb_monitor_resolution: the power monitor at the evaluated temporal
// resolutions, 20, 100, 200, 300, 400 and 500 us at 100 MHz (windows of
// 2000 to 50000 cycles).
//
// Six power_monitor instances watch the same probes: a 32-bit data bus
// (HWC), an 8-bit control field and a 1-bit flag (SVC). The activity is
// bursty: every 700 cycles a new toggle rate between 0 and 100% is drawn
// with $urandom. Each instance's coefficients are the 20 us ones scaled by
// 2000/T, so all report the same average power in mW. Checks:
//   * every estimate of every instance against a reference built from the
//     probe toggles with the same fixed-point arithmetic;
//   * over 600000 cycles (a whole number of windows for every instance)
//     the mean estimates agree within 3% of the 20 us one;
//   * the spread (standard deviation) of the estimates shrinks as the
//     window grows: longer windows smooth the activity bursts.
// The resolutions follow the monitor evaluation; the probes, coefficients
// and tolerances are this test's choices. A watchdog ends a stuck run.
module tb_monitor_resolution;
  import pwr_pkg::*;

  localparam int unsigned NL = 6;
  localparam int unsigned TS [NL] = '{2000, 10000, 20000, 30000, 40000, 50000};
  localparam int unsigned FRAC = 20;
  localparam int unsigned RUN = 600000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [40:0] probes = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Bursty stimulus.
  int unsigned rate = 50;
  int unsigned cyc_n = 0;
  always @(posedge clk) begin
    logic [31:0] m;
    cyc_n++;
    if (cyc_n % 700 == 0) rate = $urandom % 101;
    m = '0;
    for (int b = 0; b < 32; b++) if (($urandom % 100) < rate) m[b] = 1'b1;
    probes[31:0] <= probes[31:0] ^ m;
    if (($urandom % 100) < rate) probes[39:32] <= probes[39:32] + 8'd1;
    if (($urandom % 200) < rate) probes[40] <= ~probes[40];
  end

  real sum_est [NL], sum_sq [NL];
  int  n_est [NL];

  for (genvar k = 0; k < NL; k++) begin : g_lane
    localparam int unsigned T = TS[k];
    localparam logic [23:0] C_H = 24'((64'd8192 * 2000) / T);     // 1/128 mW per bit toggle at 20 us
    localparam logic [23:0] C_C = 24'((64'd262144 * 2000) / T);   // 1/4 mW per changed cycle at 20 us
    localparam logic [23:0] C_F = 24'((64'd131072 * 2000) / T);   // 1/8 mW per changed cycle at 20 us
    logic [11:0] pwr_est;
    logic        est_valid;

    power_monitor #(
      .N_SIG(3), .T(T), .COEFF_W(24), .COEFF_FRAC(FRAC),
      .SIG_W('{32, 8, 1}), .SACM('{SACM_HWC, SACM_SVC, SACM_SVC}),
      .COEFF('{C_H, C_C, C_F}), .SIGN('0), .CONST(20), .PROBE_W(41)
    ) u_mon (
      .clk(clk), .rst(rst), .model_rst(1'b0), .probes(probes),
      .pwr_est(pwr_est), .est_valid(est_valid)
    );

    longint unsigned ah, ac, af;
    logic [40:0] prev;
    bit rst_d = 1'b1;
    int q [$];

    function automatic int unsigned sat10(input longint unsigned v);
      return (v > 1023) ? 1023 : int'(v);
    endfunction

    always @(posedge clk) begin
      if (rst) begin
        ah = 0; ac = 0; af = 0;
      end else begin
        if (!rst_d) begin
          ah += $countones(probes[31:0] ^ prev[31:0]);
          ac += (probes[39:32] != prev[39:32]) ? 1 : 0;
          af += (probes[40] != prev[40]) ? 1 : 0;
        end
        if (u_mon.cyc == T - 1) begin
          int unsigned e;
          e = 20 + sat10((ah * C_H) >> FRAC) + sat10((ac * C_C) >> FRAC) + sat10((af * C_F) >> FRAC);
          q.push_back(int'(e));
          ah = 0; ac = 0; af = 0;
        end
      end
      prev = probes;
      rst_d = rst;
    end

    always @(negedge clk) begin
      if (!rst && est_valid) begin
        int e;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL %0d-cycle window: estimate without a window", T);
        end else begin
          e = q.pop_front();
          if (int'(pwr_est) != e) begin
            failures++;
            $display("FAIL %0d-cycle window: estimate %0d expected %0d", T, pwr_est, e);
          end
        end
        sum_est[k] += real'(int'(pwr_est));
        sum_sq[k]  += real'(int'(pwr_est)) * real'(int'(pwr_est));
        n_est[k]++;
      end
    end
  end

  initial begin
    real mean [NL], sd [NL];
    for (int k = 0; k < NL; k++) begin sum_est[k] = 0.0; sum_sq[k] = 0.0; n_est[k] = 0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (RUN + 5) @(negedge clk);
    for (int k = 0; k < NL; k++) begin
      mean[k] = sum_est[k] / n_est[k];
      sd[k] = $sqrt(sum_sq[k] / n_est[k] - mean[k] * mean[k]);
      $display("window %5d cycles (%3d us): %3d estimates, mean %6.1f mW, std dev %5.1f mW",
               TS[k], TS[k] / 100, n_est[k], mean[k], sd[k]);
      checks++;
      if (n_est[k] != int'(RUN / TS[k])) begin
        failures++;
        $display("FAIL %0d-cycle window: %0d estimates, expected %0d", TS[k], n_est[k], RUN / TS[k]);
      end
    end
    for (int k = 1; k < NL; k++) begin
      checks++;
      if (mean[k] < 0.97 * mean[0] || mean[k] > 1.03 * mean[0]) begin
        failures++;
        $display("FAIL %0d-cycle window: mean %0.1f vs %0.1f at 20 us", TS[k], mean[k], mean[0]);
      end
    end
    checks++;
    if (!(sd[NL-1] < sd[0] && sd[2] < sd[0])) begin
      failures++;
      $display("FAIL longer windows do not smooth the estimate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN + 100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
