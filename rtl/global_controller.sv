// global_controller: energy-budget (global) control loop.
//
// Once per epoch it compares the total consumed power P_tot with the global
// set point P_sp (the average power that meets the energy budget imposed by
// the OS or resource manager) and integrates the difference:
//     S_k = clamp(S_(k-1) + K0 * (P_sp - P_tot), -S_MAX, +S_MAX)
// S works as an energy buffer: power left unused in past epochs raises the
// budget of the next ones, overuse lowers it. The corrected total budget is
//     B_k = clamp(P_sp + S_k, 0, B_MAX)
// and is split among the cores downstream.
//
// Interface: clk, rst (synchronous), valid with p_tot (mW) and p_sp (mW);
// slack (S_k, signed mW), budget (B_k, mW) and out_valid.
// Timing: outputs registered one cycle after valid.
// Pure integrator, K0 = 0.01, S limited to +/-2 W and B to 0..4 W follow
// the controller description (the text calls the integrator pole p3 and
// the loop figure p2; both equal 1). Where the text once adds S to the
// consumed power and elsewhere to the set point, this design adds it to
// the set point, which is what makes S an energy buffer. The Q16
// accumulator is this design's choice.
module global_controller #(
  parameter int unsigned P_W   = 16,     // width of p_tot and p_sp
  parameter int unsigned B_W   = pwr_pkg::PWR_W,
  parameter int unsigned FRAC  = 16,
  parameter int          K0    = 655,    // 0.01 in Q16
  parameter int          S_MAX = 2000,   // mW
  parameter int          B_MAX = 4000    // mW
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  valid,
  input  logic [P_W-1:0]        p_tot,
  input  logic [P_W-1:0]        p_sp,
  output logic signed [B_W:0]   slack,
  output logic [B_W-1:0]        budget,
  output logic                  out_valid
);

  localparam int unsigned W = P_W + FRAC + 16;
  localparam logic signed [W-1:0] S_HI = W'(longint'(S_MAX) <<< FRAC);
  localparam logic signed [W-1:0] S_LO = -S_HI;

  logic signed [W-1:0] s_q;
  logic signed [W-1:0] err, s_sum, s_n, s_int, b_sum;

  always_comb begin
    err   = W'(p_sp) - W'(p_tot);
    s_sum = s_q + W'(K0) * err;
    if (s_sum > S_HI)      s_n = S_HI;
    else if (s_sum < S_LO) s_n = S_LO;
    else                   s_n = s_sum;
    s_int = s_n >>> FRAC;
    b_sum = W'(p_sp) + s_int;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q       <= '0;
      slack     <= '0;
      budget    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= valid;
      if (valid) begin
        s_q   <= s_n;
        slack <= (B_W+1)'(s_int);
        if (b_sum < 0)               budget <= '0;
        else if (b_sum > W'(B_MAX))  budget <= B_W'(B_MAX);
        else                         budget <= B_W'(b_sum);
      end
    end
  end

endmodule
