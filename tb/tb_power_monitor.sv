// tb_power_monitor: end-to-end test of the power monitor.
// Uses a four-term model (HWC, SVC, HWC subtracted, SVC) with a constant
// term, drives random activity of varying density on all probes, and
// checks every estimate against a reference that recomputes each term from
// the probe values (toggle counts per window, coefficient, clamp to 10
// bits, sign, constant, clamp to 12 bits). Also checks that an estimate
// comes every T cycles, two cycles after the window's last cycle, and that
// model_rst realigns the windows.
module tb_power_monitor;
  localparam int unsigned N = 4;
  localparam int unsigned T = 40;
  localparam int unsigned W [N] = '{16, 4, 8, 1};
  localparam pwr_pkg::sacm_e M [N] = '{pwr_pkg::SACM_HWC, pwr_pkg::SACM_SVC, pwr_pkg::SACM_HWC, pwr_pkg::SACM_SVC};
  localparam logic [23:0] C [N] = '{24'h020000, 24'h0C0000, 24'h008000, 24'h040000};
  localparam logic [N-1:0] SG = 4'b0100;
  localparam int K = 25;
  localparam int unsigned PW = 29;

  logic clk = 0, rst = 1, model_rst = 0;
  logic [PW-1:0] probes = '0;
  logic [11:0] pwr_est;
  logic est_valid;
  int checks = 0, failures = 0;

  power_monitor #(.N_SIG(N), .T(T), .SIG_W(W), .SACM(M), .COEFF(C), .SIGN(SG),
                  .CONST(K), .PROBE_W(PW)) dut (
    .clk, .rst, .model_rst, .probes, .pwr_est, .est_valid);

  always #5 clk = ~clk;

  function automatic int unsigned ofs(int i);
    int unsigned o = 0;
    for (int j = 0; j < i; j++) o += W[j];
    return o;
  endfunction

  // Reference: per-term activity over the window, tracked in the TB.
  int act [N];
  logic [PW-1:0] prev;
  bit primed = 0;
  int cyc = 0;           // TB's own window position
  int exp_q [$];
  int cycle = 0, last_valid = -1, est_count = 0, density = 30;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst) begin
      foreach (act[i]) act[i] = 0;
      cyc = 0;
      primed = 0;
    end else begin
      for (int i = 0; i < N; i++) begin
        automatic logic [15:0] cur = 16'((probes >> ofs(i)) & ((1 << W[i]) - 1));
        automatic logic [15:0] old = 16'((prev  >> ofs(i)) & ((1 << W[i]) - 1));
        if (primed) begin
          if (M[i] == pwr_pkg::SACM_HWC) act[i] += $countones(cur ^ old);
          else act[i] += (cur != old) ? 1 : 0;
        end
      end
      primed = 1;
      if (model_rst) begin
        foreach (act[i]) act[i] = 0;
        cyc = 0;
      end else if (cyc == T - 1) begin
        automatic int s = K;
        for (int i = 0; i < N; i++) begin
          automatic longint p = (longint'(act[i]) * C[i]) >> 16;
          if (p > 1023) p = 1023;
          s += SG[i] ? -int'(p) : int'(p);
          act[i] = 0;
        end
        if (s < 0) s = 0;
        if (s > 4095) s = 4095;
        exp_q.push_back(s);
        cyc = 0;
      end else cyc++;
    end
    prev <= probes;
  end

  int end_cycle [$];
  always @(posedge clk) if (!rst && !model_rst && cyc == T - 1) end_cycle.push_back(cycle);

  always @(negedge clk) begin
    if (!rst) begin
      if (est_valid) begin
        automatic int e = exp_q.pop_front();
        automatic int ec = end_cycle.pop_front();
        checks += 2;
        est_count++;
        if (pwr_est != 12'(e)) begin
          failures++; $display("FAIL: estimate %0d = %0d expected %0d", est_count, pwr_est, e);
        end
        // estimate registered two edges after the window's last cycle
        if (cycle - ec != 2) begin
          failures++; $display("FAIL: latency %0d", cycle - ec);
        end
      end
      for (int b = 0; b < PW; b++) if (($urandom % 100) < density) probes[b] <= ~probes[b];
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5 * T) @(posedge clk);
    density = 90;
    repeat (5 * T + 13) @(posedge clk);
    @(negedge clk); model_rst = 1; @(negedge clk); model_rst = 0;
    density = 5;
    repeat (5 * T) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (est_count < 14) begin failures++; $display("FAIL: only %0d estimates", est_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
