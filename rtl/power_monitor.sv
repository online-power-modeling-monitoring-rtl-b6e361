// power_monitor: switching-activity based online power monitor.
//
// Implements a linear power model P = CONST + sum_i (+/-) c_i * a_i, where
// a_i is the switching activity of probed signal i over one window of T
// clock cycles, measured either as Single Variation Count (SVC, control
// signals) or as Hamming Weight Count (HWC, data signals). Each model term
// gets its own power counter (local monitor), sized for its signal width,
// counting mode, coefficient and window length; a single power adder
// (global monitor) sums the counter outputs and the constant term. A
// window timer shared by all counters marks the end of every window.
//
// Interface: clk, rst (synchronous), model_rst (restarts the window, for
// aligning estimates with an external trace), probes (all probed signals
// concatenated, probe 0 in the least significant bits); pwr_est (12-bit,
// mW) and est_valid, one pulse per window.
// Timing: est_valid rises two cycles after the last cycle of each window
// (one cycle in the counters, one in the adder).
// The structure (counter per model term, shared adder, model reset, window
// parameter T) follows the monitor architecture. The default model of
// three probes (a 32-bit HWC data signal and two SVC control signals of 8
// and 1 bits) and its coefficients are placeholders of this design: the
// real terms come from the model identification of a given target.
// The window position cyc is not needed here, and only the first
// counter's valid strobe is used, since all counters share one timer.
module power_monitor #(
  parameter int unsigned N_SIG      = 3,
  parameter int unsigned T          = 2000,  // 20 us at 100 MHz
  parameter int unsigned COEFF_W    = 24,
  parameter int unsigned COEFF_FRAC = 16,
  parameter int unsigned SIG_W [N_SIG]          = '{32, 8, 1},
  parameter pwr_pkg::sacm_e SACM [N_SIG]        = '{pwr_pkg::SACM_HWC, pwr_pkg::SACM_SVC, pwr_pkg::SACM_SVC},
  parameter logic [COEFF_W-1:0] COEFF [N_SIG]   = '{24'h000200, 24'h004000, 24'h002000},
  parameter logic [N_SIG-1:0] SIGN              = '0,
  parameter int CONST                           = 20,
  // Total probe width; must equal the sum of SIG_W.
  parameter int unsigned PROBE_W                = 41
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        model_rst,
  input  logic [PROBE_W-1:0]          probes,
  output logic [pwr_pkg::PWR_W-1:0]   pwr_est,
  output logic                        est_valid
);

  // Bit offset of probe i inside the probes vector.
  function automatic int unsigned offset_of(int unsigned idx);
    int unsigned o = 0;
    for (int unsigned j = 0; j < idx; j++) o += SIG_W[j];
    return o;
  endfunction

  localparam int unsigned TOTAL_W = offset_of(N_SIG);

  logic                                   win_end;
  logic [$clog2(T+1)-1:0]                 cyc;
  logic [N_SIG-1:0][pwr_pkg::CNT_OUT_W-1:0] contrib;
  logic [N_SIG-1:0]                       cnt_valid;

  pwr_window_timer #(.T(T)) u_timer (
    .clk(clk), .rst(rst), .model_rst(model_rst), .win_end(win_end), .cyc(cyc)
  );

  for (genvar g = 0; g < N_SIG; g++) begin : g_cnt
    localparam int unsigned OFS = offset_of(g);
    localparam int unsigned W   = SIG_W[g];
    if (SACM[g] == pwr_pkg::SACM_HWC) begin : g_hwc
      pwr_counter_hwc #(
        .SIG_W(W), .T(T), .COEFF_W(COEFF_W), .COEFF_FRAC(COEFF_FRAC), .COEFF(COEFF[g])
      ) u_cnt (
        .clk(clk), .rst(rst), .model_rst(model_rst), .win_end(win_end),
        .sig(probes[OFS +: W]), .pwr(contrib[g]), .pwr_valid(cnt_valid[g])
      );
    end else begin : g_svc
      pwr_counter_svc #(
        .SIG_W(W), .T(T), .COEFF_W(COEFF_W), .COEFF_FRAC(COEFF_FRAC), .COEFF(COEFF[g])
      ) u_cnt (
        .clk(clk), .rst(rst), .model_rst(model_rst), .win_end(win_end),
        .sig(probes[OFS +: W]), .pwr(contrib[g]), .pwr_valid(cnt_valid[g])
      );
    end
  end

  pwr_adder #(
    .N(N_SIG), .IN_W(pwr_pkg::CNT_OUT_W), .OUT_W(pwr_pkg::PWR_W), .CONST(CONST)
  ) u_adder (
    .clk(clk), .rst(rst), .in_valid(cnt_valid[0]), .contrib(contrib), .sign(SIGN),
    .pwr_est(pwr_est), .est_valid(est_valid)
  );

  initial begin
    assert (TOTAL_W == PROBE_W)
      else $error("power_monitor: PROBE_W (%0d) differs from the sum of SIG_W (%0d)", PROBE_W, TOTAL_W);
  end

endmodule
