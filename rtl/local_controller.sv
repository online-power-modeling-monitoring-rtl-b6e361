// local_controller: per-core energy-cap control loop.
//
// Once per epoch k the power monitor delivers the core's average power P_k.
// The loop low-pass filters it, Pf_k = P1 * Pf_(k-1) + (1 - P1) * P_k,
// forms the error E_k = Pf_k - P_SP (positive when the core is above its
// set point) and runs a discrete PI controller with its integrator pole at
// 1 and its zero at Z0:
//     C_k = C_(k-1) + KC * (E_k - Z0 * E_(k-1))
// C_k, clamped to 0..TP-1, is the number of clock cycles per epoch the
// actuator takes away from the core (clamping the controller state is the
// anti-windup). When the core is not active the loop state is cleared and
// C_k is 0.
//
// Interface: clk, rst (synchronous), active, p_valid with p_meas (mW, the
// epoch's power estimate), p_sp (mW, local set point); act (C_k, cycles)
// and act_valid.
// Timing: act/act_valid are registered one cycle after p_valid.
// The loop structure (filtered feedback, integrator pole p0 = 1, zero
// z0 = 0.32, filter pole p1 = 0.5, output limited to 99 of 100 cycles)
// follows the controller description. The gain KC is not given and is this
// design's choice (0.4 cycles per mW, sized for cores of roughly 100 mW),
// as are the Q8 fixed-point format and the velocity form of the PI.
module local_controller #(
  parameter int unsigned TP   = pwr_pkg::TP,
  parameter int unsigned P_W  = pwr_pkg::PWR_W,
  parameter int unsigned FRAC = 8,
  parameter int          KC   = 102,   // 0.4 cycles/mW in Q8
  parameter int          Z0   = 82,    // 0.32 in Q8
  parameter int          P1   = 128    // 0.5 in Q8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    active,
  input  logic                    p_valid,
  input  logic [P_W-1:0]          p_meas,
  input  logic [P_W-1:0]          p_sp,
  output logic [$clog2(TP)-1:0]   act,
  output logic                    act_valid
);

  localparam int unsigned AW  = $clog2(TP);
  localparam int unsigned W   = P_W + FRAC + 12;          // internal signed width
  localparam int          ONE = 1 << FRAC;
  localparam logic signed [W-1:0] C_MAX = W'((TP - 1) << FRAC);

  logic signed [W-1:0] pf_q, e_q, c_q;
  logic signed [W-1:0] pf_n, e_n, de, dc, c_sum, c_n;

  always_comb begin
    pf_n  = (W'(P1) * pf_q + W'(ONE - P1) * (W'(p_meas) <<< FRAC)) >>> FRAC;
    e_n   = pf_n - (W'(p_sp) <<< FRAC);
    de    = e_n - ((W'(Z0) * e_q) >>> FRAC);
    dc    = (W'(KC) * de) >>> FRAC;
    c_sum = c_q + dc;
    if (c_sum < 0)          c_n = '0;
    else if (c_sum > C_MAX) c_n = C_MAX;
    else                    c_n = c_sum;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pf_q      <= '0;
      e_q       <= '0;
      c_q       <= '0;
      act       <= '0;
      act_valid <= 1'b0;
    end else begin
      act_valid <= p_valid;
      if (p_valid) begin
        if (active) begin
          pf_q <= pf_n;
          e_q  <= e_n;
          c_q  <= c_n;
          act  <= AW'(c_n >>> FRAC);
        end else begin
          pf_q <= '0;
          e_q  <= '0;
          c_q  <= '0;
          act  <= '0;
        end
      end
    end
  end

  // The control action never reaches a full epoch.
  assert property (@(posedge clk) disable iff (rst) act <= AW'(TP - 1));

endmodule
